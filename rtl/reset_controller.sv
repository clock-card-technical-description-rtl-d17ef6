// reset_controller: co-ordinates the three kinds of reset of a subrack.
//
// Power reset: the Power Card turns the subrack's supplies off in sequence.
// Configuration reset: the Power Card pulses the backplane reset so that
// every FPGA reloads its configuration. Both are requested by command and
// may only be passed to the Power Card once the subrack's FPGAs are ready,
// so the controller first broadcasts a PREPARE byte on the Cmd line, waits
// PREPARE_CYCLES, and then sends the power-down or configuration-reset word
// over the Power Card link. Register reset: certain registers in every FPGA
// return to preset values; it comes from a command or from the pinhole
// button on the faceplate, and the controller sends a REGISTER_RESET byte
// on the Cmd line and pulses local_reg_reset for the card's own registers.
// Requests that arrive while a sequence runs are ignored (busy is high).
// The sequence is the card's; byte codes, the wait and the button
// de-bounce are this design's choices.
//
// Interface: req_* single-cycle requests; reg_btn_n (asynchronous, active
// low); card_valid/card_ready/card_data to the Cmd line transmitter;
// pc_valid/pc_ready/pc_data to the Power Card link; local_reg_reset; busy.
// Timing: counting the clock edge that takes the PREPARE byte as edge 0,
// pc_valid rises right after edge PREPARE_CYCLES.
module reset_controller #(
  parameter int unsigned PREPARE_CYCLES = 2500,
  parameter int unsigned BTN_DEBOUNCE   = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_power,
  input  logic       req_config,
  input  logic       req_register,
  input  logic       reg_btn_n,
  output logic       card_valid,
  input  logic       card_ready,
  output logic [7:0] card_data,
  output logic       pc_valid,
  input  logic       pc_ready,
  output logic [7:0] pc_data,
  output logic       local_reg_reset,
  output logic       busy
);
  import cc_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_PREP, S_WAIT, S_PC, S_REG} state_e;

  state_e        state;
  logic          is_power;
  logic [$clog2(PREPARE_CYCLES+1)-1:0] wait_cnt;

  // Pinhole button: synchronise, de-bounce, act on the press.
  logic [1:0] btn_sync;
  logic [$clog2(BTN_DEBOUNCE+1)-1:0] btn_cnt;
  logic       btn_level, btn_press;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      btn_sync  <= '1;
      btn_cnt   <= '0;
      btn_level <= 1'b0;
      btn_press <= 1'b0;
    end else begin
      btn_sync  <= {btn_sync[0], reg_btn_n};
      btn_press <= 1'b0;
      if (!btn_sync[1] == btn_level) begin
        btn_cnt <= '0;
      end else if (btn_cnt == $bits(btn_cnt)'(BTN_DEBOUNCE - 1)) begin
        btn_cnt   <= '0;
        btn_level <= !btn_sync[1];
        btn_press <= !btn_sync[1];
      end else begin
        btn_cnt <= btn_cnt + 1'b1;
      end
    end
  end

  assign busy       = (state != S_IDLE);
  assign card_valid = (state == S_PREP) || (state == S_REG);
  assign card_data  = (state == S_REG) ? CMDB_REG_RESET : CMDB_PREPARE;
  assign pc_valid   = (state == S_PC);
  assign pc_data    = is_power ? PCW_POWER_DOWN : PCW_CONFIG_RESET;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      is_power        <= 1'b0;
      wait_cnt        <= '0;
      local_reg_reset <= 1'b0;
    end else begin
      local_reg_reset <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (req_power || req_config) begin
            is_power <= req_power;
            state    <= S_PREP;
          end else if (req_register || btn_press) begin
            state <= S_REG;
          end
        end
        S_PREP: if (card_ready) begin
          wait_cnt <= '0;
          state    <= S_WAIT;
        end
        S_WAIT: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == $bits(wait_cnt)'(PREPARE_CYCLES - 1)) state <= S_PC;
        end
        S_PC: if (pc_ready) state <= S_IDLE;
        S_REG: if (card_ready) begin
          local_reg_reset <= 1'b1;
          state           <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
