// tb_frame_timer: runs the timer at its default 25 MHz / 800 kHz / 20 kHz
// rates for five frames. Line k must start ceil(k * 25e6 / 800e3) cycles
// after the first line, so lines are 31 or 32 cycles and every frame of 40
// lines is exactly 1250 cycles; frame_start must come with line_start of
// line 0 only, and line_idx must count 0..39.
module tb_frame_timer;
  logic clk = 0, rst_n = 0;
  logic ls, fs;
  logic [5:0] idx;
  int   checks = 0, failures = 0;

  frame_timer dut (.clk(clk), .rst_n(rst_n), .line_start(ls), .frame_start(fs), .line_idx(idx));

  always #20 clk = ~clk;

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

  longint t, t0, k, exp_t, last_fs;
  int bad_line = 0, bad_fs = 0, bad_idx = 0, lines = 0, frames = 0;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    t = 0; k = 0; t0 = -1; last_fs = -1;
    while (frames < 6) begin
      @(posedge clk); #1; t++;
      if (ls) begin
        if (t0 < 0) t0 = t;
        exp_t = t0 + (k * 25_000_000 + 800_000 - 1) / 800_000;
        if (t != exp_t) bad_line++;
        if (idx != 6'(k % 40)) bad_idx++;
        if (fs != (k % 40 == 0)) bad_fs++;
        k++; lines++;
      end
      if (fs) begin
        if (!ls) bad_fs++;
        if (last_fs >= 0) check(t - last_fs == 1250, $sformatf("frame period %0d", t - last_fs));
        last_fs = t;
        frames++;
      end
    end
    check(t0 == 1, $sformatf("first line one cycle after reset (%0d)", t0));
    check(bad_line == 0, $sformatf("%0d line starts off their ideal cycle", bad_line));
    check(bad_idx == 0, "line index counts 0..39");
    check(bad_fs == 0, "frame start only with line 0");
    check(lines == 201, $sformatf("201 line starts in 5 frames (+1): %0d", lines));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
