// tb_ps_link: loops the outgoing Power Card link back to the incoming one.
// For random words it checks that (a) the bits seen on PSDO at each rising
// PSCLKO edge with PSCSO low, MSB first, are the word sent, (b) the
// receiver delivers the same word, (c) a word occupies the link for
// (2*WORD_W + 2) * SCLK_HALF cycles, and (d) a frame cut short by PSCSI
// rising is dropped rather than merged into the next word.
module tb_ps_link;
  localparam int W = 8, H = 4;
  logic clk = 0, rst_n = 0;
  logic tx_valid = 0, tx_ready;
  logic [W-1:0] tx_data = 0, rx_data;
  logic psdo, pscso, psclko, rx_valid;
  logic force_ext = 0, ext_clk = 0, ext_cs = 1, ext_d = 0;
  logic psdi, pscsi, psclki;
  int   checks = 0, failures = 0;

  assign psdi   = force_ext ? ext_d   : psdo;
  assign pscsi  = force_ext ? ext_cs  : pscso;
  assign psclki = force_ext ? ext_clk : psclko;

  ps_link #(.WORD_W(W), .SCLK_HALF(H)) dut (
    .clk(clk), .rst_n(rst_n), .tx_valid(tx_valid), .tx_ready(tx_ready), .tx_data(tx_data),
    .psdo(psdo), .pscso(pscso), .psclko(psclko), .psdi(psdi), .pscsi(pscsi), .psclki(psclki),
    .rx_valid(rx_valid), .rx_data(rx_data));

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

  // line monitor
  logic [W-1:0] mon;
  int mon_bits = 0;
  logic [W-1:0] mon_q[$];
  always @(posedge psclko) if (rst_n && !pscso && !force_ext) begin
    mon = {mon[W-2:0], psdo};
    mon_bits++;
    if (mon_bits == W) begin mon_q.push_back(mon); mon_bits = 0; end
  end

  logic [W-1:0] rx_q[$];
  always @(posedge clk) #1 if (rst_n && rx_valid) rx_q.push_back(rx_data);

  logic [W-1:0] sent[$];
  int busy_len, bad_len = 0;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (5) @(posedge clk);
    #1 check(pscso == 1 && tx_ready == 1, "idle: chip select high, ready");
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      tx_valid = 1; tx_data = W'($urandom);
      sent.push_back(tx_data);
      @(posedge clk); #1;
      tx_valid = 0;
      busy_len = 0;
      while (!tx_ready) begin @(posedge clk); #1; busy_len++; end
      if (busy_len != (2 * W + 2) * H) bad_len++;
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    check(bad_len == 0, $sformatf("%0d words with wrong duration", bad_len));
    check(mon_q.size() == 16 && rx_q.size() == 16, $sformatf("16 words on the line (%0d) and received (%0d)", mon_q.size(), rx_q.size()));
    for (int i = 0; i < 16 && i < mon_q.size() && i < rx_q.size(); i++) begin
      check(mon_q[i] == sent[i], $sformatf("line word %0d: %h vs %h", i, mon_q[i], sent[i]));
      check(rx_q[i] == sent[i], $sformatf("received word %0d: %h vs %h", i, rx_q[i], sent[i]));
    end

    // aborted frame from the Power Card side
    rx_q.delete();
    force_ext = 1;
    ext_cs = 0;
    for (int b = 0; b < 3; b++) begin
      ext_d = 1; repeat (6) @(posedge clk); ext_clk = 1; repeat (6) @(posedge clk); ext_clk = 0;
    end
    ext_cs = 1; repeat (10) @(posedge clk);
    ext_cs = 0;
    for (int b = 0; b < W; b++) begin
      ext_d = (8'h5A >> (W - 1 - b)) & 1;
      repeat (6) @(posedge clk); ext_clk = 1; repeat (6) @(posedge clk); ext_clk = 0;
    end
    repeat (6) @(posedge clk); ext_cs = 1;
    repeat (10) @(posedge clk);
    check(rx_q.size() == 1 && rx_q[0] == 8'h5A, "partial word dropped, next word intact");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
