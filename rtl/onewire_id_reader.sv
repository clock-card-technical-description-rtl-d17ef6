// onewire_id_reader: reads the 64-bit serial number of a 1-Wire silicon ID.
//
// The clock card learns its own serial number from a DS18S20 on the card
// and the subrack's serial number from a DS2401 on the backplane (BoxID
// pin). Both answer the standard 1-Wire "Read ROM" sequence, which this
// block performs after each start: a reset pulse (line low 480 us) and a
// check for the device's presence pulse (sampled 70 us after release), the
// command byte 0x33 in eight write slots, then 64 read slots. Every slot
// is 70 us: writing a 1 holds the line low for 6 us, a 0 for 60 us;
// reading holds it low for 6 us and samples it 12 us into the slot. Bits
// go LSB first. The 64 bits (family code in bits 7:0, serial number in
// 55:8, CRC in 63:56) are checked with the Dallas CRC-8 (x^8 + x^5 + x^4
// + 1): crc_ok is high when the CRC over all 64 bits is zero. The card
// names the chips and pins; the slot timing and command come from the
// standard 1-Wire protocol, and the rest of the structure is this
// design's choice.
//
// Interface: start (pulse), line_in (the pin as read), drive_low (high =
// pull the open-drain pin low), busy, done (one cycle), present, crc_ok,
// rom_id. CLK_PER_US clock cycles make one microsecond (25 at 25 MHz).
// Timing: a read takes 960 + 72 * 70 = 6000 us when a device answers; it
// ends after the reset slot (960 us) with present low when none does.
module onewire_id_reader #(
  parameter int unsigned CLK_PER_US = 25
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        line_in,
  output logic        drive_low,
  output logic        busy,
  output logic        done,
  output logic        present,
  output logic        crc_ok,
  output logic [63:0] rom_id
);
  localparam logic [7:0] CMD_READ_ROM = 8'h33;
  localparam int unsigned PW = $clog2(CLK_PER_US + 1);

  typedef enum logic [1:0] {S_IDLE, S_RESET, S_WRITE, S_READ} state_e;

  state_e        state;
  logic [PW-1:0] pre;       // cycles within the current microsecond
  logic [9:0]    us;        // microseconds within the current slot
  logic [6:0]    nbit;      // bits done in this phase
  logic [7:0]    crc;
  logic [1:0]    line_s;    // synchroniser for the pin
  logic          tick;
  logic          wbit;

  assign tick = (pre == PW'(CLK_PER_US - 1));
  assign busy = (state != S_IDLE);
  assign wbit = CMD_READ_ROM[nbit[2:0]];

  always_comb begin
    unique case (state)
      S_RESET: drive_low = (us < 10'd480);
      S_WRITE: drive_low = (us < (wbit ? 10'd6 : 10'd60));
      S_READ:  drive_low = (us < 10'd6);
      default: drive_low = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      pre     <= '0;
      us      <= '0;
      nbit    <= '0;
      crc     <= '0;
      line_s  <= '1;
      done    <= 1'b0;
      present <= 1'b0;
      crc_ok  <= 1'b0;
      rom_id  <= '0;
    end else begin
      line_s <= {line_s[0], line_in};
      done   <= 1'b0;
      pre    <= (state == S_IDLE || tick) ? '0 : pre + 1'b1;
      if (state != S_IDLE && tick) us <= us + 1'b1;

      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_RESET;
          us      <= '0;
          present <= 1'b0;
          crc_ok  <= 1'b0;
        end
        S_RESET: if (tick) begin
          if (us == 10'd550) present <= !line_s[1];
          if (us == 10'd959) begin
            us   <= '0;
            nbit <= '0;
            if (present) state <= S_WRITE;
            else begin state <= S_IDLE; done <= 1'b1; end
          end
        end
        S_WRITE: if (tick && us == 10'd69) begin
          us   <= '0;
          nbit <= nbit + 1'b1;
          if (nbit == 7'd7) begin
            nbit  <= '0;
            crc   <= '0;
            state <= S_READ;
          end
        end
        S_READ: if (tick) begin
          if (us == 10'd12) begin
            rom_id <= {line_s[1], rom_id[63:1]};
            crc    <= (crc >> 1) ^ ((crc[0] ^ line_s[1]) ? 8'h8C : 8'h00);
          end
          if (us == 10'd69) begin
            us   <= '0;
            nbit <= nbit + 1'b1;
            if (nbit == 7'd63) begin
              state  <= S_IDLE;
              done   <= 1'b1;
              crc_ok <= (crc == 8'h00);
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
