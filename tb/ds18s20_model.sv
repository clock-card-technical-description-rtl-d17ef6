// ds18s20_model: behavioural 1-Wire temperature sensor with a ROM ID.
//
// Watches the open-drain line (line = not master_low and not its own
// pull-down). A low of more than 400 us is a reset: 15 us after release
// the model pulls the line low for 120 us (presence). It then reads
// command bytes, LSB first, taking a low shorter than 15 us as a 1. It
// answers:
//   0x33 Read ROM         64 ROM bits
//   0xCC Skip ROM         then a function command:
//     0x44 Convert T      latches temp_half; read slots return 0 for
//                         CONV_US, then 1
//     0xBE Read Scratchpad 9 bytes: temperature (2), TH, TL, two reserved,
//                         COUNT_REMAIN, COUNT_PER_C, and their CRC-8
//                         (inverted in bit 0 when corrupt is high)
// A 0 is sent by holding the line low for 30 us from the master's falling
// edge. With ENABLE = 0 it never answers. Used only by testbenches.
module ds18s20_model #(
  parameter logic [63:0] ROM     = 64'h0,
  parameter bit          ENABLE  = 1'b1,
  parameter realtime     CONV_US = 750_000.0
) (
  input  logic        master_low,
  input  logic [15:0] temp_half,
  input  logic        corrupt,
  output logic        line
);
  logic slave_low = 1'b0;
  assign line = !(master_low || slave_low);

  function automatic logic [7:0] crc8(logic [63:0] d);
    logic [7:0] c = 0;
    for (int i = 0; i < 64; i++) c = (c >> 1) ^ ((c[0] ^ d[i]) ? 8'h8C : 8'h00);
    return c;
  endfunction

  typedef enum int {M_IDLE, M_ROMCMD, M_FUNC, M_TX, M_CONV} mode_e;
  mode_e       mode = M_IDLE;
  logic [71:0] tx;
  int          tx_n, tx_i, nb;
  logic [7:0]  cmd;
  logic [15:0] t_latched = 16'h0;
  realtime     t_fall, conv_end;
  int          n_convert = 0, n_read_spad = 0, n_read_rom = 0;

  initial begin
    forever begin
      @(negedge line);
      if (slave_low) continue;
      t_fall = $realtime;
      if (mode == M_TX) begin
        if (!tx[tx_i]) begin slave_low = 1'b1; #30_000 slave_low = 1'b0; end
        tx_i++;
        if (tx_i == tx_n) mode = M_IDLE;
        continue;
      end
      if (mode == M_CONV && $realtime < conv_end) begin
        slave_low = 1'b1; #30_000 slave_low = 1'b0;
        continue;
      end
      @(posedge line);
      if ($realtime - t_fall > 400_000.0) begin
        if (!ENABLE) continue;
        #15_000 slave_low = 1'b1;
        #120_000 slave_low = 1'b0;
        mode = M_ROMCMD; nb = 0;
        continue;
      end
      if (mode == M_ROMCMD || mode == M_FUNC) begin
        cmd[nb] = ($realtime - t_fall < 15_000.0);
        nb++;
        if (nb == 8) begin
          nb = 0;
          if (mode == M_ROMCMD && cmd == 8'h33) begin
            tx = {8'h00, ROM}; tx_n = 64; tx_i = 0; mode = M_TX; n_read_rom++;
          end else if (mode == M_ROMCMD && cmd == 8'hCC) begin
            mode = M_FUNC;
          end else if (mode == M_FUNC && cmd == 8'h44) begin
            t_latched = temp_half; conv_end = $realtime + CONV_US * 1000.0;
            mode = M_CONV; n_convert++;
          end else if (mode == M_FUNC && cmd == 8'hBE) begin
            tx[63:0] = {8'h10, 8'h0C, 8'hFF, 8'hFF, 8'h46, 8'h4B, t_latched};
            tx[71:64] = crc8(tx[63:0]) ^ {7'd0, corrupt};
            tx_n = 72; tx_i = 0; mode = M_TX; n_read_spad++;
          end else mode = M_IDLE;
        end
      end
    end
  end
endmodule
