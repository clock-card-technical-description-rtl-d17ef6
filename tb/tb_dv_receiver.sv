// tb_dv_receiver: drives the active-low DV input with glitches shorter than
// the de-bounce time, which must be ignored, and with real DV pulses of
// several lengths, which must each give exactly one dv_pulse at the
// expected latency (SYNC_STAGES + DEBOUNCE edges) and a dv_level that
// follows the input. Also checks that a bouncing release gives no pulse.
module tb_dv_receiver;
  localparam int SYNC = 2, DEB = 4;
  logic clk = 0, rst_n = 0, dv_n = 1;
  logic level, pulse;
  int   checks = 0, failures = 0, npulse = 0;

  dv_receiver #(.SYNC_STAGES(SYNC), .DEBOUNCE(DEB)) dut (
    .clk(clk), .rst_n(rst_n), .dv_in_n(dv_n), .dv_level(level), .dv_pulse(pulse));

  always #20 clk = ~clk;
  always @(posedge clk) #1 if (rst_n && pulse) npulse++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Hold the input low for len cycles and return the edge (1-based) after
  // which dv_pulse was first seen, or 0.
  task automatic low_for(int len, output int seen_at);
    seen_at = 0;
    @(negedge clk) dv_n = 0;
    for (int e = 1; e <= len + SYNC + DEB + 4; e++) begin
      @(posedge clk); #1;
      if (pulse && seen_at == 0) seen_at = e;
      if (e == len) begin @(negedge clk) dv_n = 1; end
    end
    repeat (10) @(posedge clk);
  endtask

  int at, n0;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (5) @(posedge clk);
    check(level == 0 && pulse == 0, "idle after reset");

    for (int g = 1; g < DEB; g++) begin
      n0 = npulse;
      low_for(g, at);
      check(at == 0 && npulse == n0, $sformatf("glitch of %0d cycles ignored", g));
      check(level == 0, "level stays low after glitch");
    end

    for (int len = DEB; len < DEB + 40; len += 7) begin
      n0 = npulse;
      low_for(len, at);
      check(at == SYNC + DEB, $sformatf("DV of %0d cycles: pulse after edge %0d, expected %0d", len, at, SYNC + DEB));
      check(npulse == n0 + 1, "exactly one pulse per DV");
      check(level == 0, "level back low after DV");
    end

    // Long DV with a bouncing release: one pulse only.
    n0 = npulse;
    @(negedge clk) dv_n = 0;
    repeat (20) @(posedge clk);
    #1 check(level == 1, "level high during DV");
    for (int b = 0; b < 3; b++) begin
      @(negedge clk) dv_n = 1; @(negedge clk) dv_n = 0;
    end
    @(negedge clk) dv_n = 1;
    repeat (20) @(posedge clk);
    check(npulse == n0 + 1, "bouncing release gives no extra pulse");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
