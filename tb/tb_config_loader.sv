// tb_config_loader: stores random images in a RAM model and plays them
// into a model of a JTAG test access port.
// The TAP model follows the IEEE 1149.1 state diagram on each rising TCK
// and collects the TDI bits clocked in Shift-DR. Checks:
//  - the RAM holds the image bytes after loading (bytes offered with gaps),
//  - exactly one DR scan happens, its bits are the image LSB first, and the
//    TAP ends in Run-Test/Idle having passed Update-DR,
//  - TCK edges = 5 + 8*len and programming keeps busy high for 2*(5 + 8*len) cycles,
//  - TMS/TDI never change while TCK is high,
//  - lengths 0 and above MAX_IMAGE_BYTES, and programming with no image,
//    are refused with error.
module tb_config_loader;
  import cc_pkg::*;
  localparam int MAXB = 300;
  logic clk = 0, rst_n = 0;
  logic load_start = 0, prog_start = 0, in_valid = 0;
  logic [31:0] load_len = 0;
  logic [7:0] in_data = 0, ram_rdata;
  ram_req_t ram_req;
  logic tck, tms, tdi, busy, done, error;
  logic [RAM_AW:0] image_len;
  int checks = 0, failures = 0;

  config_loader #(.MAX_IMAGE_BYTES(MAXB)) dut (
    .clk(clk), .rst_n(rst_n), .load_start(load_start), .load_len(load_len), .prog_start(prog_start),
    .in_valid(in_valid), .in_data(in_data), .ram_req(ram_req), .ram_rdata(ram_rdata),
    .tck(tck), .tms(tms), .tdi(tdi), .busy(busy), .done(done), .error(error), .image_len(image_len));

  sram_model #(.AW(RAM_AW)) ram (.clk(clk), .en(ram_req.en), .we(ram_req.we), .addr(ram_req.addr),
                                 .wdata(ram_req.wdata), .rdata(ram_rdata));

  always #20 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // TAP model
  typedef enum int {RESET, IDLE, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAUSE_DR, EX2_DR, UPD_DR,
                    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAUSE_IR, EX2_IR, UPD_IR} tap_e;
  tap_e tap = IDLE;
  bit   shifted[$];
  int   tck_edges = 0, dr_scans = 0, updates = 0;
  always @(posedge tck) if (rst_n) begin
    tck_edges++;
    if (tap == SH_DR) shifted.push_back(tdi);
    case (tap)
      RESET:    tap <= tms ? RESET  : IDLE;
      IDLE:     tap <= tms ? SEL_DR : IDLE;
      SEL_DR:   tap <= tms ? SEL_IR : CAP_DR;
      CAP_DR:   begin tap <= tms ? EX1_DR : SH_DR; dr_scans++; end
      SH_DR:    tap <= tms ? EX1_DR : SH_DR;
      EX1_DR:   tap <= tms ? UPD_DR : PAUSE_DR;
      PAUSE_DR: tap <= tms ? EX2_DR : PAUSE_DR;
      EX2_DR:   tap <= tms ? UPD_DR : SH_DR;
      UPD_DR:   begin tap <= tms ? SEL_DR : IDLE; updates++; end
      SEL_IR:   tap <= tms ? RESET  : CAP_IR;
      CAP_IR:   tap <= tms ? EX1_IR : SH_IR;
      SH_IR:    tap <= tms ? EX1_IR : SH_IR;
      EX1_IR:   tap <= tms ? UPD_IR : PAUSE_IR;
      PAUSE_IR: tap <= tms ? EX2_IR : PAUSE_IR;
      EX2_IR:   tap <= tms ? UPD_IR : SH_IR;
      UPD_IR:   tap <= tms ? SEL_DR : IDLE;
    endcase
  end

  int unstable = 0;
  logic ptck, ptms, ptdi;
  always @(posedge clk) begin
    if (rst_n && ptck && tck && (tms != ptms || tdi != ptdi)) unstable++;
    ptck <= tck; ptms <= tms; ptdi <= tdi;
  end

  byte unsigned img[$];

  task automatic load(int n);
    img.delete();
    @(negedge clk) load_start = 1; load_len = n;
    @(negedge clk) load_start = 0;
    for (int i = 0; i < n; i++) begin
      repeat ($urandom_range(0, 2)) @(negedge clk);
      img.push_back(8'($urandom));
      in_valid = 1; in_data = img[i];
      @(negedge clk) in_valid = 0;
    end
    repeat (3) @(negedge clk);
  endtask

  task automatic program_and_check(int n);
    int cycles, k;
    shifted.delete(); tck_edges = 0; dr_scans = 0; updates = 0;
    @(negedge clk) prog_start = 1;
    @(posedge clk); #1 prog_start = 0;
    cycles = 0;
    while (busy) begin @(posedge clk); #1; cycles++; end
    repeat (3) @(posedge clk);
    check(cycles == 2 * (5 + 8 * n), $sformatf("len %0d: programming took %0d cycles, expected %0d", n, cycles, 2 * (5 + 8 * n)));
    check(tck_edges == 5 + 8 * n, $sformatf("len %0d: %0d TCK edges", n, tck_edges));
    check(dr_scans == 1 && updates == 1 && tap == IDLE, $sformatf("len %0d: one DR scan, back in Run-Test/Idle (%s)", n, tap.name()));
    check(shifted.size() == 8 * n, $sformatf("len %0d: %0d bits shifted", n, shifted.size()));
    k = 0;
    for (int i = 0; i < 8 * n && i < shifted.size(); i++)
      if (shifted[i] != img[i / 8][i % 8]) k++;
    check(k == 0, $sformatf("len %0d: %0d bits differ from the image", n, k));
  endtask

  int k;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3) @(posedge clk);

    @(negedge clk) prog_start = 1; @(negedge clk) prog_start = 0;
    @(posedge clk); #1 check(error && !busy, "programming without an image refused");

    for (int t = 0; t < 4; t++) begin
      automatic int n = (t == 0) ? 1 : (t == 3 ? MAXB : $urandom_range(2, 40));
      load(n);
      check(!error && !busy && image_len == (RAM_AW+1)'(n), $sformatf("len %0d stored", n));
      k = 0;
      for (int i = 0; i < n; i++) if (ram.mem[i] != img[i]) k++;
      check(k == 0, $sformatf("len %0d: %0d RAM bytes wrong", n, k));
      program_and_check(n);
    end

    @(negedge clk) load_start = 1; load_len = 0;
    @(negedge clk) load_start = 0;
    #1 check(error && !busy, "length 0 refused");
    @(negedge clk) load_start = 1; load_len = MAXB + 1;
    @(negedge clk) load_start = 0;
    #1 check(error && !busy, "oversize image refused");
    check(unstable == 0, "TMS/TDI stable while TCK high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
