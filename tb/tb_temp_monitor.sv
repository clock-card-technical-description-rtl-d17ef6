// tb_temp_monitor: periodic temperature reads from a DS18S20 model at 25
// clock cycles per microsecond, with a 20 ms read period and a 2 ms
// conversion time.
//  - +25.5 degC: a valid reading, no alarm, one Convert T and one Read
//    Scratchpad per read.
//  - +65.0 and -5.0 degC: outside 0..60 degC, alarm raised; back to
//    +20.0 degC clears it.
//  - a corrupted scratchpad CRC: error set, the previous reading kept.
//  - reads start exactly one period apart.
//  - no sensor on the line: error, no valid reading.
//  - a sensor that never finishes converting: error after MAX_POLL slots.
module tb_temp_monitor;
  localparam int CPU = 25, PER = 20_000, MAXP = 64;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic        enable = 0;
  logic [2:0]  drive_low, line, busy, done, temp_valid, temp_alarm, error;
  shortint     temperature [3];
  logic [15:0] temp_half = 16'd51;
  logic        corrupt = 0;

  ds18s20_model #(.ROM(64'h5F00_0802_A33C_5110), .CONV_US(2000.0)) dev0 (
    .master_low(drive_low[0]), .temp_half(temp_half), .corrupt(corrupt), .line(line[0]));
  ds18s20_model #(.ENABLE(1'b0)) dev1 (
    .master_low(drive_low[1]), .temp_half(temp_half), .corrupt(1'b0), .line(line[1]));
  ds18s20_model #(.CONV_US(1.0e6)) dev2 (
    .master_low(drive_low[2]), .temp_half(temp_half), .corrupt(1'b0), .line(line[2]));

  for (genvar g = 0; g < 3; g++) begin : g_mon
    temp_monitor #(.CLK_PER_US(CPU), .PERIOD_US(PER), .MAX_POLL(MAXP)) dut (
      .clk(clk), .rst_n(rst_n), .enable(enable), .line_in(line[g]), .drive_low(drive_low[g]),
      .busy(busy[g]), .done(done[g]), .temp_valid(temp_valid[g]), .temperature(temperature[g]),
      .temp_alarm(temp_alarm[g]), .error(error[g]));
  end

  always #20 clk = ~clk;

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int cyc = 0;
  int starts[$];
  logic busy0_d = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    busy0_d <= busy[0];
    if (rst_n && busy[0] && !busy0_d) starts.push_back(cyc);
  end

  task automatic wait_read();
    @(posedge clk iff (rst_n && done[0]));
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3) @(posedge clk);
    enable = 1;

    wait_read();
    check(temp_valid[0] && !error[0] && temperature[0] == 16'sd51 && !temp_alarm[0],
          $sformatf("+25.5 degC read as %0d half-degrees, alarm %b error %b", temperature[0], temp_alarm[0], error[0]));
    check(dev0.n_convert == 1 && dev0.n_read_spad == 1, "one conversion and one scratchpad read");

    temp_half = 16'd130;
    wait_read();
    check(temperature[0] == 16'sd130 && temp_alarm[0], "+65.0 degC raises the alarm");
    temp_half = 16'hFFF6;
    wait_read();
    check(temperature[0] == -16'sd10 && temp_alarm[0], $sformatf("-5.0 degC raises the alarm (%0d)", temperature[0]));
    temp_half = 16'd40;
    wait_read();
    check(temperature[0] == 16'sd40 && !temp_alarm[0] && !error[0], "+20.0 degC clears the alarm");

    corrupt = 1; temp_half = 16'd44;
    wait_read();
    check(error[0] && temperature[0] == 16'sd40 && temp_valid[0], "bad CRC: error, reading kept");
    corrupt = 0;
    wait_read();
    check(!error[0] && temperature[0] == 16'sd44, "next good read clears the error");

    check(starts.size() == 6, $sformatf("%0d reads started", starts.size()));
    for (int i = 1; i < starts.size(); i++)
      check(starts[i] - starts[i-1] == PER * CPU, $sformatf("read %0d started %0d cycles after the previous", i, starts[i] - starts[i-1]));

    check(error[1] && !temp_valid[1], "no sensor: error, no reading");
    check(error[2] && !temp_valid[2], "conversion never ends: error after the poll limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
