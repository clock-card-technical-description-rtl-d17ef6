// tb_clock_card: end-to-end test of the clock card at its default sizes.
//
// Around the card it places a model of the on-board RAM (2 MiB), a JTAG
// test access port, a receiver for the Cmd line, a Power Card that both
// listens on and talks over the SPI/MICROWIRE link, and drivers for the
// host commands, the fibre bytes, the DV fibre and the readout fragments.
// It then walks through the card's functions and counts each mechanism:
//   - reference clock at half the oscillator, Sync pulse every 1250 cycles,
//   - slot and sub-array decoding,
//   - host bytes forwarded on the Cmd line, a DV pulse turned into a DV
//     marker after the next line start,
//   - a full-size (1550 kB) configuration image stored and shifted into the
//     JTAG chain bit for bit, and a refused zero-length image,
//   - a frame request refused in image mode, then the mode switch,
//   - frames compiled from shuffled fragments, a request that stalls until
//     its last frame is complete, and an overflow that drops a frame once
//     all 409 slots are full,
//   - power, configuration and register resets (by command and button),
//     and a word received from the Power Card,
//   - the card's silicon ID and the backplane BoxID read over 1-Wire after
//     reset, serial numbers and CRCs checked, then the card temperature
//     read from the same device.
// A mechanism that never happened counts as a failure.
module tb_clock_card;
  import cc_pkg::*;
  localparam int IMG      = EP1S40_IMAGE_BYTES;
  localparam int FB       = SCI_FRAME_BYTES;
  localparam int FR       = FB / N_RC;
  localparam int N_SLOTS  = (2 ** RAM_AW) / FB;

  logic clk_osc = 0, rst_n = 1, clk_ref;
  logic host_cmd_valid = 0, host_cmd_ready;
  host_op_e host_cmd_op = OP_NOP;
  logic [31:0] host_cmd_arg = 0;
  logic fo_rx_valid = 0; logic [7:0] fo_rx_data = 0;
  logic fo_tx_valid, fo_tx_last, fo_tx_ready = 1; logic [7:0] fo_tx_data;
  logic rts_dv_n = 1;
  logic [3:0] sid_pin; logic [2:0] arry_pin;
  logic bb_cmd, bb_sync;
  logic frag_valid = 0, frag_last = 0; logic [1:0] frag_rc = 0; logic [7:0] frag_data = 0;
  logic jtag_tck, jtag_tms, jtag_tdi;
  logic psdo, pscso, psclko, psdi = 0, pscsi = 1, psclki = 0;
  logic ram_en, ram_we; logic [RAM_AW-1:0] ram_addr; logic [7:0] ram_wdata, ram_rdata;
  logic reg_btn_n = 1, local_reg_reset, frame_mode, dv_level, loader_busy, loader_error, loader_done;
  logic [RAM_AW:0] image_len;
  logic dv_sent; logic [5:0] scan_line;
  logic [15:0] frames_stored, frames_dropped;
  logic pc_rx_valid; logic [7:0] pc_rx_data;
  logic [3:0] slot; logic slot_valid, is_cc_slot; card_type_e card_type; band_e band;
  logic [1:0] quadrant, card_index; logic [2:0] subarray;
  logic card_id_drive_low, card_id_in, box_id_drive_low, box_id_in;
  logic [63:0] card_serial, box_serial;
  logic card_id_ok, box_id_ok, id_busy, ids_read;
  logic [31:0] fw_version;
  logic extnd_n = 1, on_extender;

  // 1-Wire devices: a DS18S20 (family 10h) on the card, a DS2401 (family
  // 01h) on the backplane; the top byte of each ROM is its CRC.
  localparam logic [63:0] CARD_ROM = 64'h5F00_0802_A33C_5110;
  localparam logic [63:0] BOX_ROM  = 64'h9600_001B_779E_4201;
  logic temp_valid, temp_alarm, temp_error, temp_update; shortint temperature;
  ds18s20_model #(.ROM(CARD_ROM), .CONV_US(100_000.0)) card_id_dev (
    .master_low(card_id_drive_low), .temp_half(16'd57), .corrupt(1'b0), .line(card_id_in));
  onewire_slave_model #(.ROM(BOX_ROM))  box_id_dev  (.master_low(box_id_drive_low),  .line(box_id_in));

  clock_card dut (.*);

  sram_model #(.AW(RAM_AW)) ram (.clk(clk_ref), .en(ram_en), .we(ram_we), .addr(ram_addr),
                                 .wdata(ram_wdata), .rdata(ram_rdata));

  always #10 clk_osc = ~clk_osc;   // 50 MHz oscillator

  int checks = 0, failures = 0;

  // Monitors start once the card's own synchronised reset has been applied
  // (the reference clock is stopped while rst_n is low).
  logic live = 0;
  initial begin
    wait (rst_n === 1'b0);
    wait (rst_n === 1'b1);
    repeat (4) @(posedge clk_ref);
    live = 1;
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (80_000_000) @(posedge clk_osc);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_sync = 0, n_dv_marker = 0, n_host_byte = 0, n_jtag_scan = 0, n_load_refused = 0,
      n_mode_block = 0, n_mode_switch = 0, n_frames_out = 0, n_stall = 0, n_drop = 0,
      n_power = 0, n_config = 0, n_reg_cmd = 0, n_reg_btn = 0, n_pc_rx = 0, n_id = 0, n_temp = 0;

  // ---------------- Cmd line receiver ----------------
  byte unsigned cmd_q[$];
  int cst = 0; logic [7:0] csh;
  always @(posedge clk_ref) if (live) begin
    if (cst == 0) begin if (!bb_cmd) cst = 1; end
    else if (cst <= 8) begin csh = {bb_cmd, csh[7:1]}; cst++; end
    else begin cmd_q.push_back(csh); cst = 0; end
  end

  // ---------------- Sync line ----------------
  longint cyc = 0, last_sync = -1; int bad_sync = 0;
  always @(posedge clk_ref) begin
    cyc++;
    if (live && bb_sync) begin
      if (last_sync >= 0 && cyc - last_sync != 1250) bad_sync++;
      last_sync = cyc; n_sync++;
    end
  end

  // ---------------- JTAG TAP (DR path only; IR path not used) ----------------
  typedef enum int {IDLE, SEL_DR, CAP_DR, SH_DR, EX1_DR, UPD_DR, OTHER} tap_e;
  tap_e tap = IDLE;
  longint jbits = 0, jbad = 0;
  always @(posedge jtag_tck) if (live) begin
    if (tap == SH_DR) begin
      if (jtag_tdi != img_bit(jbits)) jbad++;
      jbits++;
    end
    case (tap)
      IDLE:   tap <= jtag_tms ? SEL_DR : IDLE;
      SEL_DR: tap <= jtag_tms ? OTHER : CAP_DR;
      CAP_DR: tap <= jtag_tms ? EX1_DR : SH_DR;
      SH_DR:  tap <= jtag_tms ? EX1_DR : SH_DR;
      EX1_DR: tap <= jtag_tms ? UPD_DR : OTHER;
      UPD_DR: begin tap <= jtag_tms ? SEL_DR : IDLE; n_jtag_scan++; end
      default: tap <= OTHER;
    endcase
  end

  function automatic logic [7:0] img_byte(longint i);
    return 8'((i * 131) ^ (i >> 7) ^ 8'h5C);
  endfunction
  function automatic bit img_bit(longint b);
    logic [7:0] v = img_byte(b / 8);
    return v[3'(b % 8)];
  endfunction

  // ---------------- Power Card ----------------
  byte unsigned pc_q[$];
  logic [7:0] pcs; int pcn = 0;
  always @(posedge psclko) if (live && !pscso) begin
    pcs = {pcs[6:0], psdo}; pcn++;
    if (pcn == 8) begin pc_q.push_back(pcs); pcn = 0; end
  end
  always @(posedge pscso) pcn = 0;
  always @(posedge clk_ref) if (live && pc_rx_valid) begin
    n_pc_rx++;
    check(pc_rx_data == 8'h3C, $sformatf("word from Power Card %h", pc_rx_data));
  end

  int n_lrr = 0;
  always @(posedge clk_ref) if (live && local_reg_reset) n_lrr++;

  // ---------------- frame output ----------------
  byte unsigned out_q[$];
  always @(posedge clk_ref) if (live && fo_tx_valid && fo_tx_ready) begin
    out_q.push_back(fo_tx_data);
    if (fo_tx_last) n_frames_out++;
  end

  function automatic logic [7:0] pat(int f, int rc, int i);
    return 8'(f * 37 + rc * 101 + i * 3 + (i >> 5));
  endfunction

  // ---------------- drivers ----------------
  task automatic host(host_op_e op, logic [31:0] arg);
    @(negedge clk_ref);
    host_cmd_valid = 1; host_cmd_op = op; host_cmd_arg = arg;
    do @(posedge clk_ref); while (!host_cmd_ready);
    @(negedge clk_ref) host_cmd_valid = 0; host_cmd_op = OP_NOP;
  endtask

  task automatic send_frame(int f);
    int order[4] = '{0, 1, 2, 3};
    order.shuffle();
    foreach (order[j])
      for (int i = 0; i < FR; i++) begin
        @(negedge clk_ref);
        frag_valid = 1; frag_rc = 2'(order[j]); frag_data = pat(f, order[j], i);
        frag_last = (i == FR - 1);
      end
    @(negedge clk_ref) frag_valid = 0; frag_last = 0;
  endtask

  task automatic check_out(int first_f, int n, string what);
    int bad = 0;
    check(out_q.size() == n * FB, $sformatf("%s: %0d bytes", what, out_q.size()));
    for (int k = 0; k < out_q.size() && k < n * FB; k++)
      if (out_q[k] != pat(first_f + k / FB, (k % FB) / FR, k % FR)) bad++;
    check(bad == 0, $sformatf("%s: %0d bytes wrong", what, bad));
    out_q.delete();
  endtask

  // ---------------- sequence ----------------
  longint t_dv, t0; int ph, k, fr0;
  initial begin
    sid_pin  = ~4'd8;   // the clock card's own slot
    arry_pin = 3'b101;  // 850 um, quadrant 2
    #1 rst_n = 0;      // a real falling edge, so the asynchronous resets act
    repeat (5) @(posedge clk_osc);
    rst_n = 1;
    repeat (10) @(posedge clk_ref);

    // clock and position
    ph = 0;
    repeat (40) begin @(posedge clk_osc); #1 if (clk_ref) ph++; end
    check(ph == 20, $sformatf("reference clock is oscillator/2 (%0d of 40 high)", ph));
    check(slot == 8 && slot_valid && is_cc_slot && card_type == CARD_CC, "own slot 8 = CC");
    check(band == BAND_850UM && quadrant == 2'd1, "sub-array 850 um quadrant 2");

    // host bytes on the Cmd line
    cmd_q.delete();
    host(OP_CARD_CMD, 32'h21); host(OP_CARD_CMD, 32'h42); host(OP_CARD_CMD, 32'h63);
    repeat (60) @(posedge clk_ref);
    check(cmd_q.size() == 3 && cmd_q[0] == 8'h21 && cmd_q[1] == 8'h42 && cmd_q[2] == 8'h63, "host bytes on Cmd line");
    n_host_byte = cmd_q.size();

    // DV
    cmd_q.delete();
    @(negedge clk_ref) rts_dv_n = 0; t_dv = cyc;
    repeat (12) @(negedge clk_ref); rts_dv_n = 1;
    repeat (80) @(posedge clk_ref);
    foreach (cmd_q[i]) if (cmd_q[i] == CMDB_DV) n_dv_marker++;
    check(n_dv_marker == 1, "one DV marker on the Cmd line");

    // configuration image: refused length, then full size
    host(OP_LOAD_IMAGE, 0);
    repeat (2) @(posedge clk_ref);
    if (loader_error) n_load_refused++;
    check(loader_error, "zero-length image refused");
    host(OP_LOAD_IMAGE, IMG);
    for (int i = 0; i < IMG; i++) begin
      fo_rx_valid = 1; fo_rx_data = img_byte(longint'(i));
      @(negedge clk_ref);
    end
    fo_rx_valid = 0;
    repeat (3) @(posedge clk_ref);
    check(!loader_busy && !loader_error && image_len == (RAM_AW+1)'(IMG), $sformatf("%0d-byte image stored", IMG));
    k = 0;
    for (int i = 0; i < IMG; i += 997) if (ram.mem[i] != img_byte(longint'(i))) k++;
    check(k == 0, "image bytes in RAM");
    host(OP_PROGRAM_JTAG, 0);
    t0 = cyc;
    do @(posedge clk_ref); while (loader_busy);
    check(cyc - t0 == 2 * (5 + 8 * longint'(IMG)), $sformatf("JTAG transfer took %0d cycles", cyc - t0));
    repeat (5) @(posedge clk_ref);
    check(n_jtag_scan == 1 && tap == IDLE, "one complete DR scan");
    check(jbits == 8 * longint'(IMG) && jbad == 0, $sformatf("%0d bits shifted, %0d wrong", jbits, jbad));

    // frame request refused in image mode
    @(negedge clk_ref) host_cmd_valid = 1; host_cmd_op = OP_READ_FRAMES; host_cmd_arg = 1;
    repeat (4) @(posedge clk_ref);
    if (!host_cmd_ready) n_mode_block++;
    @(negedge clk_ref) host_cmd_valid = 0;
    check(n_mode_block == 1, "frame request held off in image mode");
    host(OP_SET_MODE, 1);
    @(posedge clk_ref);
    if (frame_mode) n_mode_switch++;
    check(frame_mode, "frame buffering mode");

    // frames, stalled request
    send_frame(0); send_frame(1);
    host(OP_READ_FRAMES, 3);
    repeat (2 * FB + 200) @(posedge clk_ref);
    if (out_q.size() == 2 * FB && frames_stored == 0) n_stall++;
    check(n_stall == 1, "request waits for its third frame");
    send_frame(2);
    repeat (FB + 100) @(posedge clk_ref);
    check_out(0, 3, "frames 0-2");

    // overflow: fill every slot, one more is dropped
    for (int f = 3; f < 3 + N_SLOTS + 1; f++) send_frame(f);
    repeat (5) @(posedge clk_ref);
    check(frames_stored == 16'(N_SLOTS), $sformatf("%0d frames stored", frames_stored));
    n_drop = int'(frames_dropped);
    check(n_drop == 1, "one frame dropped when full");
    host(OP_READ_FRAMES, 2);
    repeat (2 * FB + 100) @(posedge clk_ref);
    check_out(3, 2, "oldest frames after overflow");

    // resets
    cmd_q.delete(); pc_q.delete();
    host(OP_POWER_RESET, 0);
    repeat (2700) @(posedge clk_ref);
    if (cmd_q.size() == 1 && cmd_q[0] == CMDB_PREPARE && pc_q.size() == 1 && pc_q[0] == PCW_POWER_DOWN) n_power++;
    check(n_power == 1, "power reset: PREPARE, then power-down to the Power Card");
    cmd_q.delete(); pc_q.delete();
    host(OP_CONFIG_RESET, 0);
    repeat (2700) @(posedge clk_ref);
    if (cmd_q.size() == 1 && cmd_q[0] == CMDB_PREPARE && pc_q.size() == 1 && pc_q[0] == PCW_CONFIG_RESET) n_config++;
    check(n_config == 1, "configuration reset: PREPARE, then reset word");
    cmd_q.delete(); n_lrr = 0;
    host(OP_REGISTER_RESET, 0);
    repeat (40) @(posedge clk_ref);
    if (cmd_q.size() == 1 && cmd_q[0] == CMDB_REG_RESET && n_lrr == 1) n_reg_cmd++;
    check(n_reg_cmd == 1, "register reset by command");
    cmd_q.delete(); n_lrr = 0;
    reg_btn_n = 0; repeat (40) @(posedge clk_ref); reg_btn_n = 1;
    repeat (40) @(posedge clk_ref);
    if (cmd_q.size() == 1 && cmd_q[0] == CMDB_REG_RESET && n_lrr == 1) n_reg_btn++;
    check(n_reg_btn == 1, "register reset by button");

    // Power Card -> clock card word 0x3C, MSB first
    pscsi = 0;
    for (int b = 7; b >= 0; b--) begin
      psdi = (8'h3C >> b) & 1;
      repeat (4) @(posedge clk_ref); psclki = 1; repeat (4) @(posedge clk_ref); psclki = 0;
    end
    repeat (4) @(posedge clk_ref); pscsi = 1;
    repeat (10) @(posedge clk_ref);
    check(n_pc_rx == 1, "word received from the Power Card");

    // Silicon IDs (the reads run from reset, long finished by now)
    if (ids_read && card_id_ok && box_id_ok && card_serial == CARD_ROM && box_serial == BOX_ROM) n_id++;
    check(fw_version == 32'h0001_0000 && !on_extender, "firmware version, not on an extender");
    extnd_n = 0; repeat (3) @(posedge clk_ref);
    check(on_extender, "nEXTND low reported as on an extender");
    if (temp_valid && !temp_error && !temp_alarm && temperature == 16'sd57 && card_id_dev.n_convert >= 1) n_temp++;
    check(n_temp == 1, $sformatf("card temperature read: valid %b error %b value %0d", temp_valid, temp_error, temperature));
    check(n_id == 1, $sformatf("silicon IDs read: done %b ok %b/%b card %h box %h",
                               ids_read, card_id_ok, box_id_ok, card_serial, box_serial));

    check(bad_sync == 0 && n_sync > 100, $sformatf("Sync pulses every 1250 cycles (%0d)", n_sync));
    $display("mechanisms: sync=%0d dv_marker=%0d host_bytes=%0d jtag_scans=%0d load_refused=%0d mode_block=%0d mode_switch=%0d frames_out=%0d stall=%0d drop=%0d power=%0d config=%0d reg_cmd=%0d reg_btn=%0d pc_rx=%0d silicon_id=%0d temperature=%0d",
             n_sync, n_dv_marker, n_host_byte, n_jtag_scan, n_load_refused, n_mode_block, n_mode_switch,
             n_frames_out, n_stall, n_drop, n_power, n_config, n_reg_cmd, n_reg_btn, n_pc_rx, n_id, n_temp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
