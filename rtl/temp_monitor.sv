// temp_monitor: periodic temperature read-out of the card's DS18S20.
//
// The same DS18S20 that gives the card its serial number is its
// temperature sensor. The reading is checked against an allowed range and
// the result is kept for housekeeping queries. Once enabled, and then
// every PERIOD_US, this block runs two 1-Wire transactions on the
// sensor's line:
//   1. reset, Skip ROM (0xCC), Convert T (0x44), then read slots until
//      the sensor answers 1 (conversion finished), at most MAX_POLL slots;
//   2. reset, Skip ROM, Read Scratchpad (0xBE), then 72 read slots: the
//      nine scratchpad bytes, LSB first, the last being their CRC-8.
// Slots use the same timing as onewire_id_reader: a 480 us reset with
// presence sampled 70 us after release, 70 us bit slots, a 1 written as
// 6 us low and a 0 as 60 us low, reads sampled 12 us into the slot.
// Scratchpad bytes 0-1 are the temperature, signed, in 0.5 degC steps.
// The whole 72 bits must pass the Dallas CRC-8 (x^8 + x^5 + x^4 + 1).
//
// Interface: enable (level; the first read starts when it rises),
// line_in / drive_low (open-drain line), busy, done (one cycle per read),
// temp_valid (a good reading is held), temperature (signed, 0.5 degC),
// temp_alarm (held reading outside TEMP_LOW..TEMP_HIGH), error (last read
// failed: no presence pulse, conversion timed out, or bad CRC; the last
// good reading is kept).
// Timing: reads start PERIOD_US apart. A read takes 2 * (960 + 3*8*70)
// us plus the conversion polling plus 72 * 70 us, about 12.3 ms plus the
// conversion time.
// The card's description asks for the temperature to be sensed with this
// device and checked against a range; the range, the period and the
// transactions (from the device's standard command set) are this design's.
module temp_monitor #(
  parameter int unsigned CLK_PER_US = 25,
  parameter int unsigned PERIOD_US  = 1_000_000,
  parameter int unsigned MAX_POLL   = 16_384,
  parameter shortint     TEMP_HIGH  = 16'sd120,   // 60.0 degC
  parameter shortint     TEMP_LOW   = 16'sd0      //  0.0 degC
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        line_in,
  output logic        drive_low,
  output logic        busy,
  output logic        done,
  output logic        temp_valid,
  output shortint     temperature,
  output logic        temp_alarm,
  output logic        error
);
  localparam logic [7:0] CMD_SKIP_ROM  = 8'hCC;
  localparam logic [7:0] CMD_CONVERT   = 8'h44;
  localparam logic [7:0] CMD_READ_SPAD = 8'hBE;
  localparam int unsigned PW  = $clog2(CLK_PER_US + 1);
  localparam int unsigned TW  = $clog2(PERIOD_US + 1);
  localparam int unsigned NPW = $clog2(MAX_POLL + 1);

  typedef enum logic [1:0] {S_IDLE, S_RESET, S_WRITE, S_READ} state_e;
  // Steps of one read: which slots come next.
  typedef enum logic [2:0] {
    P_RST1, P_SKIP1, P_CONV, P_POLL, P_RST2, P_SKIP2, P_RSPAD, P_DATA
  } step_e;

  state_e         state;
  step_e          step;
  logic [PW-1:0]  pre;       // cycles within the current microsecond
  logic [9:0]     us;        // microseconds within the current slot
  logic [TW-1:0]  period;    // microseconds since the last read started
  logic [NPW-1:0] npoll;
  logic [6:0]     nbit;
  logic [71:0]    spad;
  logic [7:0]     crc;
  logic [1:0]     line_s;
  logic           en_d, tick, wbit;
  logic [7:0]     wbyte;

  assign tick = (pre == PW'(CLK_PER_US - 1));
  assign busy = (state != S_IDLE);

  always_comb begin
    unique case (step)
      P_CONV:  wbyte = CMD_CONVERT;
      P_RSPAD: wbyte = CMD_READ_SPAD;
      default: wbyte = CMD_SKIP_ROM;
    endcase
    wbit = wbyte[nbit[2:0]];
    unique case (state)
      S_RESET: drive_low = (us < 10'd480);
      S_WRITE: drive_low = (us < (wbit ? 10'd6 : 10'd60));
      S_READ:  drive_low = (us < 10'd6);
      default: drive_low = 1'b0;
    endcase
  end

  // The slot that follows a step.
  function automatic state_e slot_of(step_e s);
    unique case (s)
      P_RST1, P_RST2: return S_RESET;
      P_POLL, P_DATA: return S_READ;
      default:        return S_WRITE;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      step        <= P_RST1;
      pre         <= '0;
      us          <= '0;
      period      <= '0;
      npoll       <= '0;
      nbit        <= '0;
      spad        <= '0;
      crc         <= '0;
      line_s      <= '1;
      en_d        <= 1'b0;
      done        <= 1'b0;
      temp_valid  <= 1'b0;
      temperature <= '0;
      temp_alarm  <= 1'b0;
      error       <= 1'b0;
    end else begin
      line_s <= {line_s[0], line_in};
      en_d   <= enable;
      done   <= 1'b0;
      pre    <= tick ? '0 : pre + 1'b1;
      if (state != S_IDLE && tick) us <= us + 1'b1;
      if (tick && period != TW'(PERIOD_US - 1)) period <= period + 1'b1;

      unique case (state)
        S_IDLE: if (enable && (!en_d || (tick && period == TW'(PERIOD_US - 1)))) begin
          state  <= S_RESET;
          step   <= P_RST1;
          us     <= '0;
          pre    <= '0;
          period <= '0;
        end
        S_RESET: if (tick) begin
          // The presence flag rides in crc[0] until the slot ends.
          if (us == 10'd550) crc[0] <= !line_s[1];
          if (us == 10'd959) begin
            us   <= '0;
            nbit <= '0;
            if (crc[0]) begin
              step  <= step_e'(step + 1'b1);
              state <= S_WRITE;
            end else begin
              state <= S_IDLE;
              done  <= 1'b1;
              error <= 1'b1;
            end
          end
        end
        S_WRITE: if (tick && us == 10'd69) begin
          us   <= '0;
          nbit <= nbit + 1'b1;
          if (nbit == 7'd7) begin
            nbit  <= '0;
            npoll <= '0;
            crc   <= '0;
            step  <= step_e'(step + 1'b1);
            state <= slot_of(step_e'(step + 1'b1));
          end
        end
        S_READ: if (tick) begin
          if (us == 10'd12) begin
            spad <= {line_s[1], spad[71:1]};
            crc  <= (crc >> 1) ^ ((crc[0] ^ line_s[1]) ? 8'h8C : 8'h00);
          end
          if (us == 10'd69) begin
            us <= '0;
            if (step == P_POLL) begin
              npoll <= npoll + 1'b1;
              if (spad[71]) begin
                step  <= P_RST2;
                state <= S_RESET;
              end else if (npoll == NPW'(MAX_POLL - 1)) begin
                state <= S_IDLE;
                done  <= 1'b1;
                error <= 1'b1;
              end
            end else begin
              nbit <= nbit + 1'b1;
              if (nbit == 7'd71) begin
                state <= S_IDLE;
                done  <= 1'b1;
                error <= (crc != 8'h00);
                if (crc == 8'h00) begin
                  temp_valid  <= 1'b1;
                  temperature <= shortint'(spad[15:0]);
                  temp_alarm  <= (shortint'(spad[15:0]) > TEMP_HIGH) ||
                                 (shortint'(spad[15:0]) < TEMP_LOW);
                end
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
