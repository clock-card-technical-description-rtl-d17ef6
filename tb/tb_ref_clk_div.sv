// tb_ref_clk_div: checks the reference clock divider at DIV = 2 (the card's
// 2:1 division) and DIV = 4. Over 200 oscillator cycles it counts the
// divided clock's rising edges and measures every high and low phase,
// which must each last DIV/2 oscillator cycles (50% duty).
module tb_ref_clk_div;
  logic clk = 0, rst_n = 0;
  logic o2, o4;
  int   checks = 0, failures = 0;

  ref_clk_div #(.DIV(2)) dut2 (.clk_in(clk), .rst_n(rst_n), .clk_out(o2));
  ref_clk_div #(.DIV(4)) dut4 (.clk_in(clk), .rst_n(rst_n), .clk_out(o4));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int rise2 = 0, rise4 = 0, run2 = 0, run4 = 0, bad2 = 0, bad4 = 0;
  logic p2, p4;

  initial begin
    repeat (3) @(posedge clk);
    check(o2 == 0 && o4 == 0, "outputs low in reset");
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1;
    p2 = o2; p4 = o4; run2 = 1; run4 = 1;
    repeat (200) begin
      @(posedge clk); #1;
      if (o2 != p2) begin
        if (o2) rise2++;
        if (run2 != 1) bad2++;
        run2 = 1;
      end else run2++;
      if (o4 != p4) begin
        if (o4) rise4++;
        if (run4 != 2 && rise4 + (o4 ? 0 : 1) > 1) bad4++;
        run4 = 1;
      end else run4++;
      p2 = o2; p4 = o4;
    end
    check(rise2 == 100, $sformatf("DIV=2 rising edges %0d, expected 100", rise2));
    check(rise4 == 50,  $sformatf("DIV=4 rising edges %0d, expected 50", rise4));
    check(bad2 == 0, "DIV=2 phases one cycle each");
    check(bad4 == 0, "DIV=4 phases two cycles each");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
