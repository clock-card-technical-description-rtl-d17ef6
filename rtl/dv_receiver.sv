// dv_receiver: DV ("data valid") pulse input from the real-time sequencer.
//
// The sequencer's DV signal arrives over a 5 MBd fibre receiver whose open
// collector output is low while light is on, so the signal is active low.
// The description asks for it to be synchronised to the 25 MHz reference
// clock and de-bounced. Here SYNC_STAGES flip-flops synchronise and invert
// the input; the de-bounced level dv_level only changes once the
// synchronised input has held a new value for DEBOUNCE consecutive cycles.
// dv_pulse is high for one cycle when dv_level rises. The synchroniser depth
// and the de-bounce length are this design's choices.
//
// Interface: clk/rst_n (25 MHz domain), dv_in_n (asynchronous, active low),
// dv_level, dv_pulse. Timing: counting the clock edge that first samples
// the low input as edge 1, dv_pulse is high after edge SYNC_STAGES +
// DEBOUNCE; a low shorter than DEBOUNCE cycles is ignored.
module dv_receiver #(
  parameter int unsigned SYNC_STAGES = 2,
  parameter int unsigned DEBOUNCE    = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic dv_in_n,
  output logic dv_level,
  output logic dv_pulse
);
  localparam int unsigned CW = $clog2(DEBOUNCE + 1);

  logic [SYNC_STAGES-1:0] sync;
  logic [CW-1:0]          stable_cnt;
  logic                   dv_s;

  // Idle (no light) is a high input, i.e. no DV.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '1;
    else        sync <= {sync[SYNC_STAGES-2:0], dv_in_n};
  end

  assign dv_s = ~sync[SYNC_STAGES-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stable_cnt <= '0;
      dv_level   <= 1'b0;
      dv_pulse   <= 1'b0;
    end else begin
      dv_pulse <= 1'b0;
      if (dv_s == dv_level) begin
        stable_cnt <= '0;
      end else if (stable_cnt == CW'(DEBOUNCE - 1)) begin
        stable_cnt <= '0;
        dv_level   <= dv_s;
        dv_pulse   <= dv_s;
      end else begin
        stable_cnt <= stable_cnt + 1'b1;
      end
    end
  end

  initial assert (SYNC_STAGES >= 2 && DEBOUNCE >= 1) else $error("bad dv_receiver parameters");
endmodule
