// tb_reset_controller: runs each reset sequence with a short preparation
// wait and a Cmd line and Power Card link that accept after random delays.
// Power reset must send PREPARE on the Cmd line, then the power-down word
// to the Power Card once PREPARE_CYCLES cycles have passed
// (pc_valid first sampled high PREPARE_CYCLES + 1 edges after that);
// configuration reset the same with the configuration-reset word; register
// reset (by command and by the pinhole button) a REGISTER_RESET byte and
// one local_reg_reset pulse. A button glitch shorter than the de-bounce
// time and requests made while a sequence runs must do nothing.
module tb_reset_controller;
  import cc_pkg::*;
  localparam int PREP = 20, DEB = 16;
  logic clk = 0, rst_n = 0;
  logic rp = 0, rc = 0, rr = 0, btn_n = 1;
  logic card_valid, card_ready = 0, pc_valid, pc_ready = 0, lrr, busy;
  logic [7:0] card_data, pc_data;
  int checks = 0, failures = 0;

  reset_controller #(.PREPARE_CYCLES(PREP), .BTN_DEBOUNCE(DEB)) dut (
    .clk(clk), .rst_n(rst_n), .req_power(rp), .req_config(rc), .req_register(rr), .reg_btn_n(btn_n),
    .card_valid(card_valid), .card_ready(card_ready), .card_data(card_data),
    .pc_valid(pc_valid), .pc_ready(pc_ready), .pc_data(pc_data),
    .local_reg_reset(lrr), .busy(busy));

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

  // Record every transfer with its cycle.
  longint cyc = 0;
  typedef struct { bit pc; logic [7:0] d; longint t; } ev_t;
  ev_t ev[$];
  int lrr_n = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && card_valid && card_ready) ev.push_back('{0, card_data, cyc});
    if (rst_n && pc_valid && pc_ready)     ev.push_back('{1, pc_data, cyc});
    if (rst_n && lrr) lrr_n++;
  end
  always @(negedge clk) begin
    card_ready = ($urandom_range(0, 3) == 0);
    pc_ready   = ($urandom_range(0, 3) == 0);
  end

  task automatic pulse(ref logic r);
    @(negedge clk) r = 1;
    @(negedge clk) r = 0;
  endtask

  task automatic wait_idle();
    do @(posedge clk); while (busy);
    repeat (5) @(posedge clk);
  endtask

  task automatic expect_prep_then(logic [7:0] pcw, string what);
    check(ev.size() == 2, $sformatf("%s: two transfers (%0d)", what, ev.size()));
    if (ev.size() == 2) begin
      check(!ev[0].pc && ev[0].d == CMDB_PREPARE, $sformatf("%s: PREPARE first", what));
      check(ev[1].pc && ev[1].d == pcw, $sformatf("%s: Power Card word %h", what, ev[1].d));
      // PC word is offered PREP cycles after PREPARE is taken; the random
      // ready may add a few more.
      check(ev[1].t - ev[0].t >= PREP, $sformatf("%s: wait %0d >= %0d", what, ev[1].t - ev[0].t, PREP));
    end
  endtask

  longint t_take, t_offer;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (30) @(posedge clk);
    check(!busy && !card_valid && !pc_valid, "idle after reset");

    ev.delete(); pulse(rp); wait_idle();
    expect_prep_then(PCW_POWER_DOWN, "power reset");
    check(lrr_n == 0, "power reset: no local register reset");

    ev.delete(); pulse(rc); wait_idle();
    expect_prep_then(PCW_CONFIG_RESET, "configuration reset");

    // exact wait: measure when pc_valid first rises after PREPARE is taken
    ev.delete(); pulse(rp);
    do @(posedge clk); while (!(card_valid && card_ready));
    t_take = cyc;
    do @(posedge clk); while (!pc_valid);
    t_offer = cyc;
    check(t_offer - t_take == PREP + 1, $sformatf("PC word offered %0d cycles after PREPARE", t_offer - t_take));
    // a request during the sequence is ignored
    pulse(rr);
    wait_idle();
    check(ev.size() == 2, "request while busy ignored");

    ev.delete(); lrr_n = 0; pulse(rr); wait_idle();
    check(ev.size() == 1 && !ev[0].pc && ev[0].d == CMDB_REG_RESET, "register reset byte");
    check(lrr_n == 1, "register reset: one local pulse");

    ev.delete(); lrr_n = 0;
    @(negedge clk) btn_n = 0; repeat (DEB - 4) @(negedge clk); btn_n = 1;
    repeat (60) @(posedge clk);
    check(ev.size() == 0 && lrr_n == 0, "button glitch ignored");

    @(negedge clk) btn_n = 0; repeat (DEB + 10) @(negedge clk); btn_n = 1;
    repeat (60) @(posedge clk); wait_idle();
    check(ev.size() == 1 && ev[0].d == CMDB_REG_RESET && lrr_n == 1, "button press: register reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
