// ps_link: two-way SPI/MICROWIRE link between the clock card and the
// Power Card (PC).
//
// The backplane gives two independent serial links, each with its own
// clock, chip select and data pin. On the outgoing one (PSCLKO, PSCSO,
// PSDO) the clock card is master: a word is shifted out MSB first with
// PSCSO held low, data changing while PSCLKO is low and stable across its
// rising edge; PSCLKO runs at clk / (2*SCLK_HALF). On the incoming one
// (PSCLKI, PSCSI, PSDI) the Power Card is master: the three pins are
// synchronised to clk, PSDI is sampled at each rising edge of PSCLKI while
// PSCSI is low, and after WORD_W bits the word is presented on
// rx_valid/rx_data. A rise of PSCSI drops a partial word. The pin
// assignment is the card's; word width, bit order, polarities and clock
// rate are this design's choices.
//
// Interface: tx_valid/tx_ready/tx_data (ready/valid), rx_valid/rx_data
// (one-cycle strobe), and the six pins. Timing: a word takes
// 2*SCLK_HALF*WORD_W + 2*SCLK_HALF cycles to send including chip-select
// set-up and hold; a received word appears 3 cycles after its last rising
// PSCLKI edge.
module ps_link #(
  parameter int unsigned WORD_W    = 8,
  parameter int unsigned SCLK_HALF = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // outgoing
  input  logic              tx_valid,
  output logic              tx_ready,
  input  logic [WORD_W-1:0] tx_data,
  output logic              psdo,
  output logic              pscso,
  output logic              psclko,
  // incoming
  input  logic              psdi,
  input  logic              pscsi,
  input  logic              psclki,
  output logic              rx_valid,
  output logic [WORD_W-1:0] rx_data
);
  localparam int unsigned HW = $clog2(SCLK_HALF + 1);
  localparam int unsigned BW = $clog2(WORD_W + 1);

  // ---------------- transmitter ----------------
  typedef enum logic [1:0] {TX_IDLE, TX_SETUP, TX_SHIFT, TX_HOLD} tx_state_e;
  tx_state_e         tx_state;
  logic [WORD_W-1:0] tx_sh;
  logic [BW-1:0]     tx_bits;
  logic [HW-1:0]     tx_tick;
  logic              tick;

  assign tick     = (tx_tick == HW'(SCLK_HALF - 1));
  assign tx_ready = (tx_state == TX_IDLE);
  assign psdo     = tx_sh[WORD_W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_state <= TX_IDLE;
      tx_sh    <= '0;
      tx_bits  <= '0;
      tx_tick  <= '0;
      pscso    <= 1'b1;
      psclko   <= 1'b0;
    end else begin
      tx_tick <= (tx_state == TX_IDLE || tick) ? '0 : tx_tick + 1'b1;
      unique case (tx_state)
        TX_IDLE: if (tx_valid) begin
          tx_sh    <= tx_data;
          tx_bits  <= BW'(WORD_W);
          pscso    <= 1'b0;
          tx_state <= TX_SETUP;
        end
        TX_SETUP: if (tick) tx_state <= TX_SHIFT;
        TX_SHIFT: if (tick) begin
          psclko <= ~psclko;
          if (psclko) begin             // falling edge: next bit
            tx_sh   <= tx_sh << 1;
            tx_bits <= tx_bits - 1'b1;
            if (tx_bits == BW'(1)) tx_state <= TX_HOLD;
          end
        end
        TX_HOLD: if (tick) begin
          pscso    <= 1'b1;
          tx_state <= TX_IDLE;
        end
      endcase
    end
  end

  // ---------------- receiver ----------------
  logic [2:0]        s_clk;          // third stage finds the rising edge
  logic [1:0]        s_cs, s_d;
  logic [WORD_W-2:0] rx_sh;
  logic [BW-1:0]     rx_bits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_clk    <= '0;
      s_cs     <= '1;
      s_d      <= '0;
      rx_sh    <= '0;
      rx_bits  <= '0;
      rx_valid <= 1'b0;
      rx_data  <= '0;
    end else begin
      s_clk    <= {s_clk[1:0], psclki};
      s_cs     <= {s_cs[0], pscsi};
      s_d      <= {s_d[0], psdi};
      rx_valid <= 1'b0;
      if (s_cs[1]) begin
        rx_bits <= '0;
      end else if (s_clk[1] && !s_clk[2]) begin
        if (rx_bits == BW'(WORD_W - 1)) begin
          rx_data  <= {rx_sh[WORD_W-2:0], s_d[1]};
          rx_valid <= 1'b1;
          rx_bits  <= '0;
        end else begin
          rx_bits <= rx_bits + 1'b1;
        end
        rx_sh <= {rx_sh[WORD_W-3:0], s_d[1]};
      end
    end
  end
endmodule
