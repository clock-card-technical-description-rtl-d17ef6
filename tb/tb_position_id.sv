// tb_position_id: applies every SID pin pattern and every ArryID pattern
// and compares the decoded slot, card type, index, band and quadrant with
// the backplane slot map (slot 0 AC, 1-3 BC0-BC2, 4-7 RC0-RC3, 8 CC,
// 9 PC) and the sub-array table (arrangements 000-011 are 450 um
// quadrants 1-4, 100-111 are 850 um quadrants 1-4). A grounded SID pin
// reads low and stands for a 1.
module tb_position_id;
  import cc_pkg::*;
  logic [3:0] sid;
  logic [2:0] arry;
  logic [3:0] slot;
  logic       slot_valid, is_cc;
  card_type_e ctype;
  logic [1:0] cidx, quad;
  band_e      band;
  logic [2:0] sub;
  int checks = 0, failures = 0;

  position_id dut (.sid_pin(sid), .arry_pin(arry), .slot(slot), .slot_valid(slot_valid),
                   .card_type(ctype), .card_index(cidx), .is_cc_slot(is_cc), .band(band),
                   .quadrant(quad), .subarray(sub));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  string names [10] = '{"AC", "BC0", "BC1", "BC2", "RC0", "RC1", "RC2", "RC3", "CC", "PC"};

  function automatic string decoded_name();
    case (ctype)
      CARD_AC: return "AC";
      CARD_BC: return $sformatf("BC%0d", cidx);
      CARD_RC: return $sformatf("RC%0d", cidx);
      CARD_CC: return "CC";
      CARD_PC: return "PC";
      default: return "none";
    endcase
  endfunction

  int n;
  initial begin
    arry = 0;
    for (int s = 0; s < 16; s++) begin
      // build the pin levels from the slot number: bit 1 = grounded = low
      for (int b = 0; b < 4; b++) sid[b] = ((s >> b) & 1) ? 1'b0 : 1'b1;
      #1;
      check(slot == 4'(s), $sformatf("slot %0d read as %0d", s, slot));
      check(slot_valid == (s <= 9), "slot_valid");
      check(is_cc == (s == 8), "is_cc_slot");
      if (s <= 9) check(decoded_name() == names[s], $sformatf("slot %0d is %s, got %s", s, names[s], decoded_name()));
      else        check(ctype == CARD_NONE, "unused slot has no card");
    end
    sid = 4'b0111;   // slot 8, the clock card's own slot
    for (int a = 0; a < 8; a++) begin
      arry = 3'(a); #1;
      check(band == (a < 4 ? BAND_450UM : BAND_850UM), $sformatf("arrangement %0d band", a));
      check(int'(quad) + 1 == (a % 4) + 1, $sformatf("arrangement %0d quadrant %0d", a, quad + 1));
      check(sub == 3'(a), "sub-array index");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
