// clock_card: digital logic of the subrack's clock card.
//
// The clock card is the one card in a readout subrack that the real-time
// computers talk to. It makes the 25 MHz reference clock every card runs
// on, turns the computers' commands into backplane traffic, gathers the
// readout cards' data into frames and returns them on request, reprograms
// the subrack's FPGAs over JTAG, and co-ordinates resets with the Power
// Card. This top wires those functions together:
//   ref_clk_div      oscillator -> 25 MHz reference (clk_ref, also driven out)
//   dv_receiver      RTS DV fibre input, synchronised and de-bounced
//   frame_timer      800 kHz line / 20 kHz frame strobes; Sync line pulse
//   cmd_line_tx      Cmd line bytes with DV markers at scan boundaries
//   position_id      slot and sub-array from the SID / ArryID pins
//   config_loader    binary image: fibre -> RAM -> JTAG chain
//   frame_buffer     RC fragments -> frames in RAM -> fibre on request
//   reset_controller power / configuration / register reset sequences
//   ps_link          SPI/MICROWIRE link to the Power Card
//   onewire_id_reader x2: the card's own silicon ID and the backplane BoxID,
//                    each read once after reset
//   temp_monitor     periodic temperature read-out of the card's DS18S20
//                    (the same device as the card ID), after the ID read
// The on-board RAM is shared by image storage and frame buffering, never at
// once: OP_SET_MODE selects which block owns it (fragments are ignored in
// image mode). Cmd line bytes from the reset controller go ahead of bytes
// from host commands.
//
// Host commands arrive already unpacked from the fibre protocol, as
// host_cmd_valid/host_cmd_op/host_cmd_arg with host_cmd_ready (see
// cc_pkg::host_op_e); a command is taken when valid and ready are both high.
// Image bytes come on fo_rx_*, frame bytes leave on fo_tx_*. All logic runs
// on clk_ref; rst_n (from the supply supervisor) is asynchronous and its
// release is synchronised to clk_ref (rst_sync, a standard reset
// synchroniser: asynchronous clear, synchronous release, so lint sees its
// flops both ways). The division into blocks follows the
// card's functions; the command encoding and RAM hand-over are this
// design's choices.
module clock_card
  import cc_pkg::*;
#(
  parameter int unsigned CLK_DIV        = 2,
  parameter int unsigned FRAME_BYTES    = cc_pkg::SCI_FRAME_BYTES,
  parameter int unsigned N_FRAG         = cc_pkg::N_RC,
  parameter bit          DV_ALIGN_FRAME = 1'b0,
  parameter int unsigned PREPARE_CYCLES = 2500,
  parameter logic [31:0] FW_VERSION     = 32'h0001_0000
) (
  input  logic                      clk_osc,
  input  logic                      rst_n,
  output logic                      clk_ref,
  // decoded commands from the RTL computers
  input  logic                      host_cmd_valid,
  input  host_op_e                  host_cmd_op,
  input  logic [31:0]               host_cmd_arg,
  output logic                      host_cmd_ready,
  // fibre link, byte side of the deserializer / serializer
  input  logic                      fo_rx_valid,
  input  logic [7:0]                fo_rx_data,
  output logic                      fo_tx_valid,
  output logic [7:0]                fo_tx_data,
  output logic                      fo_tx_last,
  input  logic                      fo_tx_ready,
  // RTS DV receiver
  input  logic                      rts_dv_n,
  // backplane
  input  logic [3:0]                sid_pin,
  input  logic [2:0]                arry_pin,
  output logic                      bb_cmd,
  output logic                      bb_sync,
  input  logic                      frag_valid,
  input  logic [$clog2(N_FRAG)-1:0] frag_rc,
  input  logic [7:0]                frag_data,
  input  logic                      frag_last,
  output logic                      jtag_tck,
  output logic                      jtag_tms,
  output logic                      jtag_tdi,
  output logic                      psdo,
  output logic                      pscso,
  output logic                      psclko,
  input  logic                      psdi,
  input  logic                      pscsi,
  input  logic                      psclki,
  // on-board RAM
  output logic                      ram_en,
  output logic                      ram_we,
  output logic [RAM_AW-1:0]         ram_addr,
  output logic [7:0]                ram_wdata,
  input  logic [7:0]                ram_rdata,
  // 1-Wire silicon ID devices (open drain: drive_low pulls the line low)
  output logic                      card_id_drive_low,
  input  logic                      card_id_in,
  output logic                      box_id_drive_low,
  input  logic                      box_id_in,
  output logic [63:0]               card_serial,
  output logic [63:0]               box_serial,
  output logic                      card_id_ok,
  output logic                      box_id_ok,
  output logic                      id_busy,
  output logic                      ids_read,
  output logic                      temp_valid,
  output shortint                   temperature,
  output logic                      temp_alarm,
  output logic                      temp_error,
  output logic                      temp_update,
  output logic [31:0]               fw_version,
  // faceplate and status
  input  logic                      reg_btn_n,
  input  logic                      extnd_n,         // nEXTND backplane pin
  output logic                      on_extender,
  output logic                      local_reg_reset,
  output logic                      frame_mode,
  output logic                      dv_level,
  output logic                      loader_busy,
  output logic                      loader_error,
  output logic                      loader_done,
  output logic [RAM_AW:0]           image_len,
  output logic                      dv_sent,
  output logic [5:0]                scan_line,
  output logic [15:0]               frames_stored,
  output logic [15:0]               frames_dropped,
  output logic                      pc_rx_valid,
  output logic [7:0]                pc_rx_data,
  output logic [3:0]                slot,
  output logic                      slot_valid,
  output card_type_e                card_type,
  output logic                      is_cc_slot,
  output band_e                     band,
  output logic [1:0]                quadrant,
  output logic [1:0]                card_index,
  output logic [2:0]                subarray
);
  // ---------------- clock and reset ----------------
  logic       rst_n_ref;
  logic [1:0] rst_sync;

  ref_clk_div #(.DIV(CLK_DIV)) u_clk (.clk_in(clk_osc), .rst_n(rst_n), .clk_out(clk_ref));

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) rst_sync <= '0;
    else        rst_sync <= {rst_sync[0], 1'b1};
  end
  assign rst_n_ref = rst_sync[1];

  // ---------------- command routing ----------------
  logic        take;
  logic        mode_frames;
  logic        ld_start, pg_start, rd_req, rst_pow, rst_cfg, rst_reg;
  logic        fb_rd_ready, rc_busy;
  logic        tx_in_ready, tx_in_valid;
  logic [7:0]  tx_in_data;
  logic        rc_card_valid, rc_card_ready;
  logic [7:0]  rc_card_data;
  logic        host_byte_valid;

  always_comb begin
    unique case (host_cmd_op)
      OP_SET_MODE:       host_cmd_ready = !loader_busy && fb_rd_ready;
      OP_LOAD_IMAGE,
      OP_PROGRAM_JTAG:   host_cmd_ready = !loader_busy && !mode_frames;
      OP_READ_FRAMES:    host_cmd_ready = fb_rd_ready && mode_frames;
      OP_CARD_CMD:       host_cmd_ready = tx_in_ready && !rc_card_valid;
      OP_POWER_RESET,
      OP_CONFIG_RESET,
      OP_REGISTER_RESET: host_cmd_ready = !rc_busy;
      default:           host_cmd_ready = 1'b1;
    endcase
  end

  assign take            = host_cmd_valid && host_cmd_ready;
  assign ld_start        = take && host_cmd_op == OP_LOAD_IMAGE;
  assign pg_start        = take && host_cmd_op == OP_PROGRAM_JTAG;
  assign rd_req          = take && host_cmd_op == OP_READ_FRAMES;
  assign rst_pow         = take && host_cmd_op == OP_POWER_RESET;
  assign rst_cfg         = take && host_cmd_op == OP_CONFIG_RESET;
  assign rst_reg         = take && host_cmd_op == OP_REGISTER_RESET;
  assign host_byte_valid = host_cmd_valid && host_cmd_op == OP_CARD_CMD && !rc_card_valid;

  always_ff @(posedge clk_ref or negedge rst_n_ref) begin
    if (!rst_n_ref)                           mode_frames <= 1'b0;
    else if (take && host_cmd_op == OP_SET_MODE) mode_frames <= host_cmd_arg[0];
  end
  assign frame_mode = mode_frames;

  // ---------------- timing, DV, Cmd and Sync lines ----------------
  logic dv_pulse, line_start, frame_start;

  dv_receiver u_dv (
    .clk(clk_ref), .rst_n(rst_n_ref), .dv_in_n(rts_dv_n),
    .dv_level(dv_level), .dv_pulse(dv_pulse)
  );

  frame_timer u_timer (
    .clk(clk_ref), .rst_n(rst_n_ref),
    .line_start(line_start), .frame_start(frame_start), .line_idx(scan_line)
  );

  always_ff @(posedge clk_ref or negedge rst_n_ref) begin
    if (!rst_n_ref) bb_sync <= 1'b0;
    else            bb_sync <= frame_start;
  end

  assign tx_in_valid   = rc_card_valid || host_byte_valid;
  assign tx_in_data    = rc_card_valid ? rc_card_data : host_cmd_arg[7:0];
  assign rc_card_ready = tx_in_ready;

  cmd_line_tx #(.DV_ALIGN_FRAME(DV_ALIGN_FRAME)) u_cmd (
    .clk(clk_ref), .rst_n(rst_n_ref),
    .in_valid(tx_in_valid), .in_ready(tx_in_ready), .in_data(tx_in_data),
    .dv_pulse(dv_pulse), .line_start(line_start), .frame_start(frame_start),
    .cmd_out(bb_cmd), .dv_sent(dv_sent)
  );

  // ---------------- position ----------------
  position_id u_pos (
    .sid_pin(sid_pin), .arry_pin(arry_pin),
    .slot(slot), .slot_valid(slot_valid), .card_type(card_type), .card_index(card_index),
    .is_cc_slot(is_cc_slot), .band(band), .quadrant(quadrant), .subarray(subarray)
  );

  // ---------------- RAM users ----------------
  ram_req_t ld_ram, fb_ram, ram_req;

  config_loader u_loader (
    .clk(clk_ref), .rst_n(rst_n_ref),
    .load_start(ld_start), .load_len(host_cmd_arg), .prog_start(pg_start),
    .in_valid(fo_rx_valid), .in_data(fo_rx_data),
    .ram_req(ld_ram), .ram_rdata(ram_rdata),
    .tck(jtag_tck), .tms(jtag_tms), .tdi(jtag_tdi),
    .busy(loader_busy), .done(loader_done), .error(loader_error), .image_len(image_len)
  );

  frame_buffer #(.FRAME_BYTES(FRAME_BYTES), .N_FRAG(N_FRAG)) u_fb (
    .clk(clk_ref), .rst_n(rst_n_ref),
    .frag_valid(frag_valid && mode_frames), .frag_rc(frag_rc), .frag_data(frag_data),
    .frag_last(frag_last),
    .rd_req(rd_req), .rd_nframes(host_cmd_arg[15:0]), .rd_ready(fb_rd_ready),
    .out_valid(fo_tx_valid), .out_data(fo_tx_data), .out_last(fo_tx_last),
    .out_ready(fo_tx_ready),
    .ram_req(fb_ram), .ram_rdata(ram_rdata),
    .frames_stored(frames_stored), .frames_dropped(frames_dropped)
  );

  assign ram_req   = mode_frames ? fb_ram : ld_ram;
  assign ram_en    = ram_req.en;
  assign ram_we    = ram_req.we;
  assign ram_addr  = ram_req.addr;
  assign ram_wdata = ram_req.wdata;

  // ---------------- resets and Power Card ----------------
  logic       pc_valid, pc_ready;
  logic [7:0] pc_data;

  reset_controller #(.PREPARE_CYCLES(PREPARE_CYCLES)) u_rst (
    .clk(clk_ref), .rst_n(rst_n_ref),
    .req_power(rst_pow), .req_config(rst_cfg), .req_register(rst_reg), .reg_btn_n(reg_btn_n),
    .card_valid(rc_card_valid), .card_ready(rc_card_ready), .card_data(rc_card_data),
    .pc_valid(pc_valid), .pc_ready(pc_ready), .pc_data(pc_data),
    .local_reg_reset(local_reg_reset), .busy(rc_busy)
  );

  ps_link u_ps (
    .clk(clk_ref), .rst_n(rst_n_ref),
    .tx_valid(pc_valid), .tx_ready(pc_ready), .tx_data(pc_data),
    .psdo(psdo), .pscso(pscso), .psclko(psclko),
    .psdi(psdi), .pscsi(pscsi), .psclki(psclki),
    .rx_valid(pc_rx_valid), .rx_data(pc_rx_data)
  );

  // ---------------- extender detection ----------------
  // nEXTND is low when the card sits on an extender card; it is a static
  // level, brought through two flip-flops and reported as a status bit.
  logic [1:0] extnd_s;
  always_ff @(posedge clk_ref or negedge rst_n_ref) begin
    if (!rst_n_ref) extnd_s <= 2'b11;
    else            extnd_s <= {extnd_s[0], extnd_n};
  end
  assign on_extender = !extnd_s[1];

  // ---------------- silicon IDs ----------------
  // Both devices are read once, starting on the first cycle after reset.
  // *_id_ok is high once the device answered and its ROM CRC matched;
  // ids_read goes high when both reads have finished.
  localparam int unsigned CLK_PER_US = REF_CLK_HZ / 1_000_000;
  logic id_started, id_start;
  logic card_present, card_crc_ok, box_present, box_crc_ok;
  logic card_busy, card_done, box_busy, box_done, card_fin, box_fin;
  logic card_rd_low, temp_low, temp_busy, temp_done;

  always_ff @(posedge clk_ref or negedge rst_n_ref) begin
    if (!rst_n_ref) begin
      id_started <= 1'b0;
      card_fin   <= 1'b0;
      box_fin    <= 1'b0;
    end else begin
      id_started <= 1'b1;
      if (card_done) card_fin <= 1'b1;
      if (box_done)  box_fin  <= 1'b1;
    end
  end
  assign id_start = !id_started;

  onewire_id_reader #(.CLK_PER_US(CLK_PER_US)) u_card_id (
    .clk(clk_ref), .rst_n(rst_n_ref), .start(id_start),
    .line_in(card_id_in), .drive_low(card_rd_low),
    .busy(card_busy), .done(card_done), .present(card_present), .crc_ok(card_crc_ok), .rom_id(card_serial)
  );

  onewire_id_reader #(.CLK_PER_US(CLK_PER_US)) u_box_id (
    .clk(clk_ref), .rst_n(rst_n_ref), .start(id_start),
    .line_in(box_id_in), .drive_low(box_id_drive_low),
    .busy(box_busy), .done(box_done), .present(box_present), .crc_ok(box_crc_ok), .rom_id(box_serial)
  );

  assign card_id_ok = card_present && card_crc_ok;
  assign box_id_ok  = box_present && box_crc_ok;
  assign id_busy    = card_busy || box_busy || temp_busy;   // any 1-Wire activity

  // The DS18S20 is also the temperature sensor. Its line is handed to the
  // temperature monitor once the serial number has been read, so the two
  // never drive it at the same time.
  temp_monitor #(.CLK_PER_US(CLK_PER_US)) u_temp (
    .clk(clk_ref), .rst_n(rst_n_ref), .enable(card_fin),
    .line_in(card_id_in), .drive_low(temp_low),
    .busy(temp_busy), .done(temp_done), .temp_valid(temp_valid), .temperature(temperature),
    .temp_alarm(temp_alarm), .error(temp_error)
  );
  assign card_id_drive_low = card_rd_low || temp_low;
  assign temp_update       = temp_done;
  assign ids_read   = card_fin && box_fin;

  // Firmware version: fixed when the design is built.
  assign fw_version = FW_VERSION;
endmodule
