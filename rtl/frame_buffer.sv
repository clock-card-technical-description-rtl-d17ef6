// frame_buffer: compiles readout frames from card fragments in the
// on-board RAM and sends them to the RTL computers on request.
//
// Each readout card (RC) delivers its share of a frame as a fragment; the
// clock card compiles the fragments into whole frames and keeps them until
// the computers ask for them, since it never sends data unasked. The RAM
// is divided into N_SLOTS frame slots of FRAME_BYTES each (409 slots of a
// 5120-byte scientific frame in 2 MiB) and used as a circular buffer.
//
// Write side: fragment bytes arrive on frag_valid/frag_rc/frag_data with
// frag_last on a fragment's final byte. Fragment r of a frame occupies
// bytes r*FRAG_BYTES .. (r+1)*FRAG_BYTES-1 of the slot, so fragments may
// come in any order; a frame is complete, and counted in frames_stored,
// once all N_FRAG fragments have ended. A frame that starts while every
// slot is full is discarded and counted in frames_dropped.
// Read side: rd_req with rd_nframes asks for that many consecutive frames;
// they are streamed, oldest first, on out_valid/out_data/out_last (last
// byte of each frame) under out_ready back-pressure, waiting for frames
// that are not complete yet. rd_ready is high while no request is open.
// Writes take the RAM first; reads use the free cycles, up to one byte per
// cycle. Frame size and RAM size follow the card; the fragment layout,
// request form and drop policy are this design's choices.
//
// Interface: ram_req is registered; the RAM samples it at a clock edge and
// returns ram_rdata after that edge. Fragment input is not back-pressured.
// Timing: the first byte of a requested, stored frame appears on out_data
// three cycles after rd_req.
module frame_buffer
  import cc_pkg::*;
#(
  parameter int unsigned FRAME_BYTES = cc_pkg::SCI_FRAME_BYTES,
  parameter int unsigned N_FRAG      = cc_pkg::N_RC,
  parameter int unsigned N_SLOTS     = (2 ** RAM_AW) / FRAME_BYTES
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      frag_valid,
  input  logic [$clog2(N_FRAG)-1:0] frag_rc,
  input  logic [7:0]                frag_data,
  input  logic                      frag_last,
  input  logic                      rd_req,
  input  logic [15:0]               rd_nframes,
  output logic                      rd_ready,
  output logic                      out_valid,
  output logic [7:0]                out_data,
  output logic                      out_last,
  input  logic                      out_ready,
  output ram_req_t                  ram_req,
  input  logic [7:0]                ram_rdata,
  output logic [15:0]               frames_stored,
  output logic [15:0]               frames_dropped
);
  localparam int unsigned FRAG_BYTES = FRAME_BYTES / N_FRAG;
  localparam int unsigned OW  = $clog2(FRAME_BYTES + 1);
  localparam int unsigned SW  = $clog2(N_SLOTS + 1);
  localparam logic [RAM_AW-1:0] LAST_BASE = RAM_AW'((N_SLOTS - 1) * FRAME_BYTES);

  // ---------------- write side ----------------
  logic [RAM_AW-1:0] wr_base;
  logic [N_FRAG-1:0] frag_mask;
  logic [OW-1:0]     frag_off;
  logic              dropping;
  logic              frame_idle;   // no byte of the current frame seen yet
  logic              wr_now;
  logic              commit;
  logic [N_FRAG-1:0] mask_next;
  logic [SW-1:0]     stored;
  logic              full;

  assign full       = (stored == SW'(N_SLOTS));
  assign frame_idle = (frag_mask == '0) && (frag_off == '0);
  assign mask_next  = frag_mask | (N_FRAG'(1) << frag_rc);
  assign wr_now     = frag_valid && !(frame_idle ? full : dropping) &&
                      (frag_off < OW'(FRAG_BYTES));
  assign commit     = frag_valid && frag_last && (mask_next == '1) &&
                      !(frame_idle ? full : dropping);

  // ---------------- read side ----------------
  logic [RAM_AW-1:0] rd_base;
  logic [OW-1:0]     rd_off;
  logic [15:0]       to_send;
  logic              rd_now, rd_frame_done;
  logic [1:0]        pipe_v, pipe_last;
  logic [2:0]        fifo_cnt;
  logic [8:0]        fifo [4];     // {last, data}
  logic [1:0]        fifo_wp, fifo_rp;
  logic [2:0]        in_flight;
  logic              pop, push;

  assign rd_ready      = (to_send == '0);
  assign in_flight     = 3'(pipe_v[0]) + 3'(pipe_v[1]);
  assign rd_now        = !wr_now && (to_send != '0) && (stored != '0) &&
                         (fifo_cnt + in_flight < 3'd4);
  assign rd_frame_done = rd_now && (rd_off == OW'(FRAME_BYTES - 1));
  assign pop           = out_valid && out_ready;
  assign push          = pipe_v[1];
  assign out_valid     = (fifo_cnt != '0);
  assign {out_last, out_data} = fifo[fifo_rp];
  assign frames_stored = 16'(stored);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_base        <= '0;
      frag_mask      <= '0;
      frag_off       <= '0;
      dropping       <= 1'b0;
      stored         <= '0;
      frames_dropped <= '0;
      rd_base        <= '0;
      rd_off         <= '0;
      to_send        <= '0;
      pipe_v         <= '0;
      pipe_last      <= '0;
      fifo_cnt       <= '0;
      fifo_wp        <= '0;
      fifo_rp        <= '0;
      ram_req        <= '0;
    end else begin
      ram_req <= '0;

      // fragments
      if (frag_valid) begin
        if (frame_idle) begin
          dropping <= full;
          if (full) frames_dropped <= frames_dropped + 1'b1;
        end
        if (frag_last) begin
          frag_off <= '0;
          if (mask_next == '1) begin
            frag_mask <= '0;
            dropping  <= 1'b0;
            if (commit) wr_base <= (wr_base == LAST_BASE) ? '0 : wr_base + RAM_AW'(FRAME_BYTES);
          end else begin
            frag_mask <= mask_next;
          end
        end else begin
          frag_off <= frag_off + 1'b1;
        end
      end
      if (wr_now)
        ram_req <= '{en: 1'b1, we: 1'b1,
                     addr: wr_base + RAM_AW'(frag_rc) * RAM_AW'(FRAG_BYTES) + RAM_AW'(frag_off),
                     wdata: frag_data};

      // requests and reads
      if (rd_req && rd_ready) to_send <= rd_nframes;
      if (rd_now) begin
        ram_req <= '{en: 1'b1, we: 1'b0, addr: rd_base + RAM_AW'(rd_off), wdata: '0};
        if (rd_frame_done) begin
          rd_off  <= '0;
          rd_base <= (rd_base == LAST_BASE) ? '0 : rd_base + RAM_AW'(FRAME_BYTES);
          to_send <= to_send - 1'b1;
        end else begin
          rd_off <= rd_off + 1'b1;
        end
      end
      stored <= stored + SW'(commit) - SW'(rd_frame_done);

      pipe_v    <= {pipe_v[0], rd_now};
      pipe_last <= {pipe_last[0], rd_frame_done};
      if (push) fifo_wp <= fifo_wp + 1'b1;
      if (pop) fifo_rp <= fifo_rp + 1'b1;
      fifo_cnt <= fifo_cnt + 3'(push) - 3'(pop);
    end
  end

  // FIFO storage needs no reset: fifo_cnt says which entries are valid.
  always_ff @(posedge clk) begin
    if (push) fifo[fifo_wp] <= {pipe_last[1], ram_rdata};
  end

  a_frag_len: assert property (@(posedge clk) disable iff (!rst_n)
    frag_valid |-> frag_off < OW'(FRAG_BYTES));
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(push && !pop && fifo_cnt == 3'd4));
endmodule
