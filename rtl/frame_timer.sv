// frame_timer: line-scan and frame-scan timing for the subrack.
//
// The readout scans address lines at 800 kHz and whole frames at 20 kHz,
// all derived from the 25 MHz reference clock. 25 MHz / 800 kHz is 31.25,
// not a whole number of cycles, so this block keeps a phase accumulator:
// every cycle it adds LINE_HZ/g and a line starts whenever the sum wraps at
// CLK_HZ/g (g = gcd of the two rates; 4 and 125 for the default rates).
// Lines are therefore 31 or 32 cycles long, their average is exact, and
// every frame of LINE_HZ/FRAME_HZ = 40 lines is exactly 1250 cycles. The
// accumulator scheme is this design's choice; the rates are the card's.
//
// Interface: clk/rst_n, line_start (one cycle at each line), frame_start
// (one cycle, together with line_start of line 0), line_idx (0..39).
// Timing: the first frame starts in the first cycle after reset; line k
// then starts ceil(k * CLK_HZ / LINE_HZ) cycles later. The accumulator is
// reset to one step short of wrapping so that this holds from line 0.
module frame_timer #(
  parameter int unsigned CLK_HZ   = cc_pkg::REF_CLK_HZ,
  parameter int unsigned LINE_HZ  = cc_pkg::LINE_HZ,
  parameter int unsigned FRAME_HZ = cc_pkg::FRAME_HZ
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       line_start,
  output logic       frame_start,
  output logic [5:0] line_idx
);
  function automatic int unsigned gcd(int unsigned a, int unsigned b);
    int unsigned t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  localparam int unsigned G     = gcd(CLK_HZ, LINE_HZ);
  localparam int unsigned INC   = LINE_HZ / G;
  localparam int unsigned MOD   = CLK_HZ / G;
  localparam int unsigned LINES = LINE_HZ / FRAME_HZ;
  localparam int unsigned AW    = $clog2(MOD + INC);

  logic [AW-1:0] phase;
  logic [AW-1:0] phase_next;
  logic          wrap;

  assign phase_next = phase + AW'(INC);
  assign wrap       = phase_next >= AW'(MOD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= AW'(MOD - INC);
      line_idx    <= 6'(LINES - 1);
      line_start  <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      line_start  <= wrap;
      frame_start <= wrap && line_idx == 6'(LINES - 1);
      phase       <= wrap ? phase_next - AW'(MOD) : phase_next;
      if (wrap) line_idx <= (line_idx == 6'(LINES - 1)) ? '0 : line_idx + 1'b1;
    end
  end

  initial assert (LINES >= 1 && LINES <= 64 && LINE_HZ % FRAME_HZ == 0 && LINE_HZ < CLK_HZ)
    else $error("frame_timer: unsupported rates");
endmodule
