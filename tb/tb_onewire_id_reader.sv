// tb_onewire_id_reader: reads three 1-Wire ID models through the block at
// 25 clock cycles per microsecond.
//  - A DS18S20-like device (family 0x10) with a correct CRC: present,
//    ROM read bit for bit, crc_ok, and a read time of 6000 us.
//  - A DS2401-like device (family 0x01) whose CRC byte is corrupted: ROM
//    read, crc_ok low.
//  - No device: present low, done after the 960 us reset slot.
// The expected CRC is computed here with the Dallas CRC-8.
module tb_onewire_id_reader;
  localparam int CPU = 25;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  function automatic logic [7:0] crc8(logic [55:0] d);
    logic [7:0] c = 0;
    for (int i = 0; i < 56; i++) c = (c >> 1) ^ ((c[0] ^ d[i]) ? 8'h8C : 8'h00);
    return c;
  endfunction

  localparam logic [55:0] BODY_A = 56'h0008_02A3_3C51_10;
  localparam logic [55:0] BODY_B = 56'h0000_1B77_9E42_01;

  logic [63:0] rom_a, rom_b;
  initial begin
    rom_a = {crc8(BODY_A), BODY_A};
    rom_b = {crc8(BODY_B) ^ 8'h01, BODY_B};
  end
  // Published example ROM 02 1C B8 01 00 00 00 (family first) has CRC A2.
  localparam logic [55:0] BODY_REF = 56'h0000_0001_B81C_02;

  logic start = 0;
  logic [2:0] drive_low, line;
  logic [2:0] busy, done, present, crc_ok;
  logic [63:0] rom_id [3];

  // ROMs are fixed at elaboration; the models compute them the same way.
  onewire_slave_model #(.ROM({8'h5F, BODY_A})) dev_a (.master_low(drive_low[0]), .line(line[0]));
  onewire_slave_model #(.ROM({8'h97, BODY_B})) dev_b (.master_low(drive_low[1]), .line(line[1]));
  onewire_slave_model #(.ENABLE(1'b0))         dev_c (.master_low(drive_low[2]), .line(line[2]));

  for (genvar g = 0; g < 3; g++) begin : g_rd
    onewire_id_reader #(.CLK_PER_US(CPU)) dut (
      .clk(clk), .rst_n(rst_n), .start(start), .line_in(line[g]), .drive_low(drive_low[g]),
      .busy(busy[g]), .done(done[g]), .present(present[g]), .crc_ok(crc_ok[g]), .rom_id(rom_id[g]));
  end

  always #20 clk = ~clk;

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int t_done [3];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int g = 0; g < 3; g++) if (rst_n && done[g]) t_done[g] = cyc;
  end

  int t0;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3) @(posedge clk);
    check(crc8(BODY_REF) == 8'hA2, $sformatf("reference CRC %h", crc8(BODY_REF)));
    check(rom_a[63:56] == 8'h5F && rom_b[63:56] == 8'h97, $sformatf("model CRCs %h %h", crc8(BODY_A), crc8(BODY_B)));
    @(negedge clk) start = 1; t0 = cyc + 1;
    @(negedge clk) start = 0;
    wait (!busy[0] && !busy[1] && !busy[2]);
    repeat (5) @(posedge clk);
    check(present[0] && crc_ok[0] && rom_id[0] == rom_a, $sformatf("device A: present %b crc_ok %b id %h", present[0], crc_ok[0], rom_id[0]));
    check(present[1] && !crc_ok[1] && rom_id[1] == rom_b, $sformatf("device B: bad CRC seen (id %h)", rom_id[1]));
    check(!present[2], "no device: not present");
    check(t_done[0] - t0 == 6000 * CPU, $sformatf("read took %0d cycles", t_done[0] - t0));
    check(t_done[2] - t0 == 960 * CPU, $sformatf("empty bus done after %0d cycles", t_done[2] - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
