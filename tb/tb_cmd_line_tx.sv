// tb_cmd_line_tx: decodes the serial Cmd line with an independent receiver
// (start bit 0, eight bits LSB first, stop bit 1) and checks that
//  - random command bytes come out unchanged and in order,
//  - back-to-back bytes take exactly 10 clocks each (25 Mbit/s, one bit
//    per clock),
//  - a DV pulse yields one DV marker byte whose start bit comes after the
//    next line start and no later than one byte time after it, ahead of
//    command bytes still waiting,
//  - a second transmitter built with frame alignment sends its marker in
//    two clock edges after the edge that sees the next frame start.
// Line starts are generated every 31 cycles and frame starts every 10
// lines; the design under test uses line alignment (its default).
module tb_cmd_line_tx;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [7:0] in_data = 0;
  logic dv_pulse = 0, ls = 0, fs = 0;
  logic cmd_out, dv_sent;
  int   checks = 0, failures = 0;

  cmd_line_tx dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                   .in_data(in_data), .dv_pulse(dv_pulse), .line_start(ls), .frame_start(fs),
                   .cmd_out(cmd_out), .dv_sent(dv_sent));

  // Second transmitter with frame alignment, no command traffic.
  logic cmd_out_f, dv_sent_f;
  cmd_line_tx #(.DV_ALIGN_FRAME(1'b1)) dut_f (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b0), .in_ready(), .in_data(8'h00),
    .dv_pulse(dv_pulse), .line_start(ls), .frame_start(fs), .cmd_out(cmd_out_f), .dv_sent(dv_sent_f));

  always #20 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // scan strobes
  longint cyc = 0, last_ls = -1000;
  int lcount = 0;
  longint fs_after = -1, dvf_at = -1, dv_mark = -1;
  int n_dvf = 0;
  always @(posedge clk) begin
    if (rst_n && dv_pulse) dv_mark = cyc;
    if (rst_n && fs && dv_mark >= 0 && fs_after < 0) fs_after = cyc;
    if (rst_n && dv_sent_f) begin dvf_at = cyc; n_dvf++; end
    cyc <= cyc + 1;
    ls  <= (cyc % 31 == 0);
    fs  <= (cyc % 310 == 0);
    if (ls) last_ls = cyc;
  end

  // serial receiver
  byte unsigned rx_q[$];
  longint       rx_start[$];
  int           rx_state = 0, bad_stop = 0;
  logic [7:0]   sh;
  longint       st;
  always @(posedge clk) #1 begin
    if (rst_n) begin
      if (rx_state == 0) begin
        if (cmd_out == 0) begin rx_state = 1; st = cyc; end
      end else if (rx_state <= 8) begin
        sh = {cmd_out, sh[7:1]};
        rx_state++;
      end else begin
        if (cmd_out != 1) bad_stop++;
        rx_q.push_back(sh);
        rx_start.push_back(st);
        rx_state = 0;
      end
    end
  end

  byte unsigned sent_q[$];
  task automatic send(byte unsigned b);
    @(negedge clk);
    in_valid = 1; in_data = b;
    do @(posedge clk); while (!in_ready);
    sent_q.push_back(b);
    @(negedge clk) in_valid = 0;
  endtask

  byte unsigned b;
  longint dv_at, marker_t, nb;
  int k, found;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (5) @(posedge clk);
    #1 check(cmd_out == 1, "line idles high");

    // 1. random bytes, with gaps
    for (int i = 0; i < 30; i++) begin
      do b = 8'($urandom); while (b == CMDB_DV);
      send(b);
      repeat ($urandom_range(0, 12)) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    check(rx_q.size() == 30, $sformatf("30 bytes received (%0d)", rx_q.size()));
    k = 0;
    foreach (rx_q[i]) if (i < sent_q.size() && rx_q[i] != sent_q[i]) k++;
    check(k == 0, $sformatf("%0d bytes differ", k));
    check(bad_stop == 0, "stop bits");

    // 2. back-to-back throughput
    rx_q.delete(); rx_start.delete(); sent_q.delete();
    @(negedge clk) in_valid = 1;
    for (int i = 0; i < 12; i++) begin
      do b = 8'($urandom); while (b == CMDB_DV);
      in_data = b;
      do @(posedge clk); while (!in_ready);
      sent_q.push_back(b);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (20) @(posedge clk);
    check(rx_q.size() == 12, "12 streamed bytes");
    k = 0;
    for (int i = 1; i < rx_start.size(); i++) if (rx_start[i] - rx_start[i-1] != 10) k++;
    check(k == 0, $sformatf("%0d byte gaps not 10 clocks", k));
    k = 0;
    foreach (rx_q[i]) if (rx_q[i] != sent_q[i]) k++;
    check(k == 0, "streamed bytes intact");

    // 3. DV marker, alone and while commands are queued
    for (int trial = 0; trial < 6; trial++) begin
      rx_q.delete(); rx_start.delete(); sent_q.delete();
      repeat ($urandom_range(3, 40)) @(posedge clk);
      @(negedge clk) dv_pulse = 1; dv_at = cyc;
      @(negedge clk) dv_pulse = 0;
      if (trial % 2 == 1) fork
        for (int i = 0; i < 6; i++) send(8'h11 + 8'(i));
      join_none
      repeat (120) @(posedge clk);
      wait fork;
      repeat (30) @(posedge clk);
      found = 0;
      foreach (rx_q[i]) if (rx_q[i] == CMDB_DV) begin found++; marker_t = rx_start[i]; k = i; end
      check(found == 1, $sformatf("trial %0d: one DV marker (%0d)", trial, found));
      // first line start at or after the pulse
      begin
        nb = dv_at + 1;
        while (nb % 31 != 1) nb++;
        check(marker_t >= nb && marker_t <= nb + 11,
              $sformatf("trial %0d: marker at %0d, line start %0d", trial, marker_t, nb));
      end
      if (trial % 2 == 1) check(rx_q.size() == 7, "queued commands still all sent");
    end

    // frame alignment
    repeat (400) @(posedge clk);
    n_dvf = 0; fs_after = -1; dv_mark = -1;
    @(negedge clk) dv_pulse = 1;
    @(negedge clk) dv_pulse = 0;
    repeat (700) @(posedge clk);
    check(n_dvf == 1, $sformatf("frame-aligned: one marker (%0d)", n_dvf));
    check(fs_after >= 0 && dvf_at == fs_after + 2,
          $sformatf("frame-aligned: marker at %0d, frame start at %0d", dvf_at, fs_after));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
