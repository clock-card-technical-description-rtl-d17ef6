// ref_clk_div: derives the subrack reference clock from the crystal oscillator.
//
// The card divides its oscillator 2:1 in a flip-flop to get a 25 MHz clock
// with a 50% duty cycle; that clock then feeds the fibre transceivers, the
// FPGA and the backplane. This module is that divider: a counter that toggles
// the output every DIV/2 input cycles, so any even DIV gives 50% duty.
// DIV = 2 follows the description; a 100 MHz oscillator would need DIV = 4.
//
// Interface: clk_in (oscillator), rst_n (asynchronous clear, output low),
// clk_out (divided clock). Timing: clk_out changes on rising edges of
// clk_in, first rising edge DIV/2 input cycles after reset is released.
module ref_clk_div #(
  parameter int unsigned DIV = 2
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);
  localparam int unsigned HALF = DIV / 2;
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else if (cnt == CW'(HALF - 1)) begin
      cnt     <= '0;
      clk_out <= ~clk_out;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  initial assert (DIV >= 2 && DIV % 2 == 0) else $error("DIV must be even and at least 2");
endmodule
