// position_id: where the card sits, from backplane and subrack ID pins.
//
// Slot: four SID pins are either left open or grounded on the backplane,
// and the card pulls them up. An open pin reads high and means 0, a
// grounded pin reads low and means 1, so the slot number is the inverted
// pin word (SID0 taken as the least significant bit). Slots 0..9 hold, left
// to right, AC, BC0-BC2, RC0-RC3, CC and PC; card_type and card_index give
// that map, and slot_valid is low for the unused codes 10..15.
// Sub-array: three ArryID pins read an arrangement of tabs that ties the
// subrack to one quadrant of one of the two arrays. Arrangement 0xx is the
// 450 um array, 1xx the 850 um array, and the two low bits give quadrants
// 1..4 (encoded 0..3). The arrangement is read as ArryID2 ArryID1 ArryID0.
// The slot map and arrangement table are the card's; the bit order and the
// reading of the arrangement from the pin levels are this design's.
//
// Interface: sid_pin[3:0], arry_pin[2:0] in; decoded fields out.
// Timing: purely combinational; the pins are static while powered.
module position_id (
  input  logic              [3:0] sid_pin,
  input  logic              [2:0] arry_pin,
  output logic              [3:0] slot,
  output logic                    slot_valid,
  output cc_pkg::card_type_e      card_type,
  output logic              [1:0] card_index,
  output logic                    is_cc_slot,
  output cc_pkg::band_e           band,
  output logic              [1:0] quadrant,
  output logic              [2:0] subarray
);
  import cc_pkg::*;

  assign slot       = ~sid_pin;
  assign slot_valid = (slot <= 4'd9);
  assign is_cc_slot = (slot == 4'd8);

  always_comb begin
    card_type  = CARD_NONE;
    card_index = '0;
    unique case (slot) inside
      4'd0:         card_type = CARD_AC;
      [4'd1:4'd3]:  begin card_type = CARD_BC; card_index = 2'(slot - 4'd1); end
      [4'd4:4'd7]:  begin card_type = CARD_RC; card_index = 2'(slot - 4'd4); end
      4'd8:         card_type = CARD_CC;
      4'd9:         card_type = CARD_PC;
      [4'd10:4'd15]: card_type = CARD_NONE;
    endcase
  end

  assign subarray = arry_pin;
  assign band     = band_e'(arry_pin[2]);
  assign quadrant = arry_pin[1:0];
endmodule
