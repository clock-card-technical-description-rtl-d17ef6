// tb_frame_buffer: compiles small frames (64 bytes, 4 fragments of 16) in a
// 4-slot buffer backed by the RAM model and reads them back.
// Fragment bytes carry a pattern that depends on frame number, card and
// offset, so every byte read back can be checked independently. Checks:
//  - fragments sent in shuffled order are put back in card order,
//  - a request for more frames than are stored waits for the missing ones,
//  - frames come out oldest first, 64 bytes each with out_last on the last,
//  - with every slot full, the next frame is discarded and counted, and the
//    stored frames survive,
//  - with no writes and out_ready high, a frame streams at one byte per
//    cycle (the 64th byte taken 68 cycles after the request: 4 cycles of
//    latency, then one byte per cycle),
//  - random out_ready back-pressure loses no byte.
module tb_frame_buffer;
  import cc_pkg::*;
  localparam int FB = 64, NF = 4, NS = 4, FR = FB / NF;
  logic clk = 0, rst_n = 0;
  logic frag_valid = 0, frag_last = 0;
  logic [1:0] frag_rc = 0;
  logic [7:0] frag_data = 0;
  logic rd_req = 0, rd_ready;
  logic [15:0] rd_n = 0, stored, dropped;
  logic out_valid, out_last, out_ready = 1;
  logic [7:0] out_data, ram_rdata;
  ram_req_t ram_req;
  int checks = 0, failures = 0;
  bit bp = 0;   // random back-pressure on/off

  frame_buffer #(.FRAME_BYTES(FB), .N_FRAG(NF), .N_SLOTS(NS)) dut (
    .clk(clk), .rst_n(rst_n), .frag_valid(frag_valid), .frag_rc(frag_rc), .frag_data(frag_data),
    .frag_last(frag_last), .rd_req(rd_req), .rd_nframes(rd_n), .rd_ready(rd_ready),
    .out_valid(out_valid), .out_data(out_data), .out_last(out_last), .out_ready(out_ready),
    .ram_req(ram_req), .ram_rdata(ram_rdata), .frames_stored(stored), .frames_dropped(dropped));

  sram_model #(.AW(RAM_AW)) ram (.clk(clk), .en(ram_req.en), .we(ram_req.we), .addr(ram_req.addr),
                                 .wdata(ram_req.wdata), .rdata(ram_rdata));

  always #20 clk = ~clk;

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

  function automatic logic [7:0] pat(int f, int rc, int i);
    return 8'(f * 37 + rc * 101 + i * 3 + (i >> 2));
  endfunction

  // Send frame f: its four fragments in a random order, bytes with gaps.
  task automatic send_frame(int f);
    int order[4] = '{0, 1, 2, 3};
    order.shuffle();
    foreach (order[j]) begin
      for (int i = 0; i < FR; i++) begin
        @(negedge clk);
        frag_valid = 1; frag_rc = 2'(order[j]); frag_data = pat(f, order[j], i);
        frag_last = (i == FR - 1);
        @(negedge clk) frag_valid = 0; frag_last = 0;
        repeat ($urandom_range(0, 1)) @(negedge clk);
      end
    end
  endtask

  // Output collector
  logic [7:0] got[$];
  bit         got_last[$];
  always @(negedge clk) out_ready = bp ? ($urandom_range(0, 2) != 0) : 1'b1;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    got.push_back(out_data); got_last.push_back(out_last);
  end

  task automatic request(int n);
    @(negedge clk);
    while (!rd_ready) @(negedge clk);
    rd_req = 1; rd_n = 16'(n);
    @(negedge clk) rd_req = 0;
  endtask

  task automatic check_frames(int first_f, int n, string what);
    int bad = 0, badl = 0;
    check(got.size() == n * FB, $sformatf("%s: %0d bytes, expected %0d", what, got.size(), n * FB));
    for (int k = 0; k < n * FB && k < got.size(); k++) begin
      int f = first_f + k / FB, o = k % FB;
      if (got[k] != pat(f, o / FR, o % FR)) bad++;
      if (got_last[k] != (o == FB - 1)) badl++;
    end
    check(bad == 0, $sformatf("%s: %0d bytes wrong", what, bad));
    check(badl == 0, $sformatf("%s: %0d frame-end flags wrong", what, badl));
    got.delete(); got_last.delete();
  endtask

  int t0, t1;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3) @(posedge clk);
    check(stored == 0 && rd_ready && !out_valid, "empty after reset");

    // two frames, request three: the third arrives later
    send_frame(0); send_frame(1);
    repeat (5) @(posedge clk);
    check(stored == 2, $sformatf("two frames stored (%0d)", stored));
    bp = 1;
    request(3);
    repeat (400) @(posedge clk);
    check(got.size() == 2 * FB && !rd_ready, "two frames sent, third awaited");
    send_frame(2);
    repeat (300) @(posedge clk);
    check_frames(0, 3, "frames 0-2");
    check(rd_ready && stored == 0, "request done, buffer empty");

    // fill all slots, then one more frame is dropped
    bp = 0;
    for (int f = 3; f < 3 + NS + 1; f++) send_frame(f);
    repeat (5) @(posedge clk);
    check(stored == NS, $sformatf("all %0d slots full (%0d)", NS, stored));
    check(dropped == 1, $sformatf("one frame dropped (%0d)", dropped));
    // speed with no writes
    @(negedge clk) rd_req = 1; rd_n = 1;
    @(negedge clk) rd_req = 0;
    t0 = 0;
    while (got.size() < FB) begin @(posedge clk); t0++; end
    check(t0 == FB + 4, $sformatf("one frame streamed in %0d cycles", t0));
    check_frames(3, 1, "frame 3");
    request(NS - 1);
    repeat (400) @(posedge clk);
    check_frames(4, NS - 1, "frames 4-6 (frame 7 dropped)");

    // reads and writes at once, with back-pressure
    bp = 1;
    fork
      request(3);
      begin for (int f = 8; f < 11; f++) send_frame(f); end
    join
    repeat (400) @(posedge clk);
    check_frames(8, 3, "frames 8-10 while writing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
