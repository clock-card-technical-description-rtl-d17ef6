// onewire_slave_model: behavioural 1-Wire device that answers Read ROM.
//
// Watches the open-drain line (line = not master_low and not its own
// pull-down). A low of more than 400 us is a reset: 15 us after release
// the model pulls the line low for 120 us (presence). It then reads eight
// write slots (sampled 30 us after each falling edge) as a command byte,
// LSB first; for 0x33 it answers the next 64 read slots with ROM, LSB
// first, holding the line low for 30 us from the falling edge for a 0.
// With ENABLE = 0 it never answers. Used only by testbenches.
module onewire_slave_model #(
  parameter logic [63:0] ROM    = 64'h0,
  parameter bit          ENABLE = 1'b1
) (
  input  logic master_low,
  output logic line
);
  logic slave_low = 1'b0;
  assign line = !(master_low || slave_low);

  logic [7:0] cmd;
  int         nread;
  realtime    t_fall;

  initial begin
    forever begin
      @(negedge line);
      if (slave_low) continue;
      t_fall = $realtime;
      @(posedge line);
      if ($realtime - t_fall > 400_000.0 && ENABLE) begin
        #15_000 slave_low = 1'b1;
        #120_000 slave_low = 1'b0;
        for (int i = 0; i < 8; i++) begin
          @(negedge line);
          #30_000 cmd[i] = line;
        end
        if (cmd == 8'h33) begin
          for (int i = 0; i < 64; i++) begin
            @(negedge line);
            if (!ROM[i]) begin
              slave_low = 1'b1;
              #30_000 slave_low = 1'b0;
            end
          end
        end
      end
    end
  end
endmodule
