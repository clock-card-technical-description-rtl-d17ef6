// config_loader: stores a binary configuration image and plays it into the
// subrack's JTAG chain.
//
// The clock card can reprogram every Altera device in its subrack. With
// pure binary images no byte-code player is needed: a state machine moves
// the image from the fibre link into the on-board RAM, and later from the
// RAM onto the JTAG bus without decoding it. This is that state machine.
//
// Load: after load_start with load_len bytes, each byte presented on
// in_valid/in_data is written to the RAM at addresses 0..load_len-1.
// A length of 0 or above MAX_IMAGE_BYTES (the 1550 kB image of the largest
// FPGA the card may carry) is refused and sets error.
// Program: after prog_start the stored image is shifted into the chain as
// one data-register scan. From Run-Test/Idle, TMS = 1,0,0 reaches
// Shift-DR; the image bits follow on TDI, LSB of each byte first, with TMS
// = 1 on the last one; TMS = 1,0 then returns through Update-DR to
// Run-Test/Idle. TCK runs at clk/2: TMS and TDI change with TCK low and
// the devices sample them on the rising edge. Bytes are fetched from the
// RAM one ahead of the bit being shifted, so the scan never pauses. The
// load/program split is the card's; the TAP sequence, TCK rate and bit
// order are this design's choices (instruction scans that select a target
// device are left to the image).
//
// Interface: ram_req (registered; the RAM samples it at a clock edge and
// returns ram_rdata after that edge, so data reaches the loader two edges
// after it issued the request). Timing: loading takes one cycle per byte
// offered; programming keeps busy high for 2*(5 + 8*len) cycles.
module config_loader
  import cc_pkg::*;
#(
  parameter int unsigned MAX_IMAGE_BYTES = cc_pkg::EP1S40_IMAGE_BYTES
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load_start,
  input  logic [31:0]     load_len,
  input  logic            prog_start,
  input  logic            in_valid,
  input  logic [7:0]      in_data,
  output ram_req_t        ram_req,
  input  logic [7:0]      ram_rdata,
  output logic            tck,
  output logic            tms,
  output logic            tdi,
  output logic            busy,
  output logic            done,
  output logic            error,
  output logic [RAM_AW:0] image_len
);
  localparam int unsigned BCW = RAM_AW + 4;   // bit counter width

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_PRE, S_SHIFT, S_POST} state_e;

  state_e           state;
  logic [RAM_AW:0]  wcnt;
  logic [RAM_AW:0]  rd_addr;
  logic [BCW-1:0]   bit_cnt;
  logic [2:0]       seq_cnt;
  logic             phase;        // 0: drive TMS/TDI with TCK low, 1: TCK high
  logic [7:0]       cur, nxt;
  logic [1:0]       rd_pipe;
  logic             tms_b, tdi_b;
  logic             fetch;

  assign busy = (state != S_IDLE);

  // TMS/TDI of the bit now being presented.
  always_comb begin
    tms_b = 1'b0;
    tdi_b = 1'b0;
    unique case (state)
      S_PRE:   tms_b = (seq_cnt == 3'd0);
      S_SHIFT: begin
        tdi_b = cur[0];
        tms_b = (bit_cnt == BCW'({image_len, 3'b000} - 1));
      end
      S_POST:  tms_b = (seq_cnt == 3'd0);
      default: ;
    endcase
  end

  // A new byte is needed after the preamble and after every eighth bit.
  assign fetch = phase && ((state == S_PRE && seq_cnt == 3'd2) ||
                           (state == S_SHIFT && bit_cnt[2:0] == 3'd7 &&
                            bit_cnt != BCW'({image_len, 3'b000} - 1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      wcnt      <= '0;
      rd_addr   <= '0;
      bit_cnt   <= '0;
      seq_cnt   <= '0;
      phase     <= 1'b0;
      cur       <= '0;
      nxt       <= '0;
      rd_pipe   <= '0;
      ram_req   <= '0;
      tck       <= 1'b0;
      tms       <= 1'b0;
      tdi       <= 1'b0;
      done      <= 1'b0;
      error     <= 1'b0;
      image_len <= '0;
    end else begin
      ram_req <= '0;
      done    <= 1'b0;
      rd_pipe <= {rd_pipe[0], 1'b0};
      if (rd_pipe[1]) nxt <= ram_rdata;

      unique case (state)
        S_IDLE: begin
          tck <= 1'b0;
          tms <= 1'b0;
          if (load_start) begin
            if (load_len == 0 || load_len > 32'(MAX_IMAGE_BYTES)) begin
              error <= 1'b1;
            end else begin
              error     <= 1'b0;
              image_len <= (RAM_AW+1)'(load_len);
              wcnt      <= '0;
              state     <= S_LOAD;
            end
          end else if (prog_start) begin
            if (image_len == 0) begin
              error <= 1'b1;
            end else begin
              error   <= 1'b0;
              ram_req <= '{en: 1'b1, we: 1'b0, addr: '0, wdata: '0};
              rd_pipe <= 2'b01;
              rd_addr <= 1;
              seq_cnt <= '0;
              phase   <= 1'b0;
              state   <= S_PRE;
            end
          end
        end

        S_LOAD: if (in_valid) begin
          ram_req <= '{en: 1'b1, we: 1'b1, addr: wcnt[RAM_AW-1:0], wdata: in_data};
          wcnt    <= wcnt + 1'b1;
          if (wcnt + 1'b1 == image_len) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end

        S_PRE, S_SHIFT, S_POST: begin
          phase <= ~phase;
          if (!phase) begin
            tck <= 1'b0;
            tms <= tms_b;
            tdi <= tdi_b;
          end else begin
            tck <= 1'b1;
            if (fetch) begin
              cur     <= nxt;
              ram_req <= '{en: 1'b1, we: 1'b0, addr: rd_addr[RAM_AW-1:0], wdata: '0};
              rd_pipe <= 2'b01;
              rd_addr <= rd_addr + 1'b1;
            end else if (state == S_SHIFT) begin
              cur <= cur >> 1;
            end
            unique case (state)
              S_PRE: begin
                seq_cnt <= seq_cnt + 1'b1;
                if (seq_cnt == 3'd2) begin
                  bit_cnt <= '0;
                  state   <= S_SHIFT;
                end
              end
              S_SHIFT: begin
                bit_cnt <= bit_cnt + 1'b1;
                if (bit_cnt == BCW'({image_len, 3'b000} - 1)) begin
                  seq_cnt <= '0;
                  state   <= S_POST;
                end
              end
              default: begin  // S_POST
                seq_cnt <= seq_cnt + 1'b1;
                if (seq_cnt == 3'd1) begin
                  state <= S_IDLE;
                  done  <= 1'b1;
                end
              end
            endcase
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // TMS/TDI must not change while TCK is high.
  a_tck_stable: assert property (@(posedge clk) disable iff (!rst_n)
    tck && $past(tck) == 1'b0 |-> $stable(tms) && $stable(tdi));
endmodule
