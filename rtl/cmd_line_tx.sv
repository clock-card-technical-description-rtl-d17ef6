// cmd_line_tx: serial transmitter for the backplane Cmd line.
//
// The clock card drives one multi-tapped LVDS Cmd line that every other card
// listens to. Commands go out as a serial byte stream at one bit per 25 MHz
// clock (25 Mbit/s, the backplane rate), and DV pulses from the sequencer are
// folded into the same stream so that the readout cards learn when data is
// valid. A DV pulse is held pending until the next line start (or, with
// DV_ALIGN_FRAME = 1, the next frame start); at that point a DV marker byte
// is due, and it is sent as soon as the line is between bytes, ahead of any
// waiting command byte. Bytes are never cut, so DV information stays
// byte aligned.
//
// Byte framing (this design's choice): idle high, one start bit 0, eight
// data bits LSB first, one stop bit 1; ten clocks per byte. The DV marker
// value is cc_pkg::CMDB_DV. The choice between line and frame alignment is
// left open by the description; both are offered.
//
// Interface: in_valid/in_ready/in_data, a ready/valid handshake for command
// bytes (in_ready is high only while the shifter is free and no DV marker
// is due); dv_pulse, line_start, frame_start from the DV receiver and frame
// timer; cmd_out, the serial line; dv_sent, one cycle when a DV marker's
// start bit goes out. Timing: a byte accepted in cycle t puts its start bit
// on cmd_out in cycle t+1. With the line idle, the start bit of a DV
// marker leaves two clock edges after the edge that samples the line or
// frame start (one to mark the marker due, one to launch it); behind a
// byte in flight it waits at most ten more cycles.
module cmd_line_tx #(
  parameter bit DV_ALIGN_FRAME = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  input  logic       dv_pulse,
  input  logic       line_start,
  input  logic       frame_start,
  output logic       cmd_out,
  output logic       dv_sent
);
  import cc_pkg::*;

  logic [9:0] shreg;      // {stop, data[7:0], start}, sent from bit 0
  logic [3:0] bits_left;
  logic       dv_pending; // DV seen, waiting for the scan boundary
  logic       dv_due;     // boundary reached, marker to send
  logic       boundary;
  logic       idle;

  assign boundary = DV_ALIGN_FRAME ? frame_start : line_start;
  assign idle     = (bits_left == 4'd0);
  assign in_ready = idle && !dv_due;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '1;
      bits_left  <= '0;
      dv_pending <= 1'b0;
      dv_due     <= 1'b0;
      dv_sent    <= 1'b0;
      cmd_out    <= 1'b1;
    end else begin
      dv_sent <= 1'b0;

      if (dv_pulse) dv_pending <= 1'b1;
      if (boundary && (dv_pending || dv_pulse)) begin
        dv_due     <= 1'b1;
        dv_pending <= 1'b0;
      end

      if (idle && dv_due) begin
        cmd_out   <= 1'b0;
        shreg     <= {1'b1, CMDB_DV, 1'b0} >> 1;
        bits_left <= 4'd9;
        dv_due    <= boundary && (dv_pending || dv_pulse);
        dv_sent   <= 1'b1;
      end else if (idle && in_valid) begin
        cmd_out   <= 1'b0;
        shreg     <= {1'b1, in_data, 1'b0} >> 1;
        bits_left <= 4'd9;
      end else if (!idle) begin
        cmd_out   <= shreg[0];
        shreg     <= {1'b1, shreg[9:1]};
        bits_left <= bits_left - 1'b1;
      end else begin
        cmd_out <= 1'b1;
      end
    end
  end

  // A byte offered must stay offered until taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) in_valid && !in_ready |=> in_valid && $stable(in_data);
  endproperty
  a_hold: assert property (p_hold);
endmodule
