// hw_trojan: model of the performance-degradation hardware Trojan that an
// adversary hides in the router, behind the input buffer. Its trigger watches
// 16 payload data lines (flit bits [28:13]) and fires when they carry the rare
// value TRIG_VALUE; otherwise the flit passes untouched. Its payload corrupts
// one critical field at the bit positions that field has in the plain flit
// format, without any knowledge of the shuffle:
//   TR_HEAD  inverts the head bit (HHT)       TR_TAIL  inverts the tail bit (THT)
//   TR_QUAN  inverts QUAN bits [2:1] (QT)     TR_ADDR  clears DST x bits, so the
//            packet heads for column 0, the left edge of the mesh (AT)
//   TR_NONE  no Trojan.
// The four Trojan kinds and the XOR-on-a-field payload follow the published
// attack; the watched lines, the trigger value and the exact bits hit are this
// design's choices. Purely combinational; fired_o flags an active trigger.
module hw_trojan
  import noc_pkg::*;
#(
  parameter trojan_e     KIND       = TR_HEAD,
  parameter logic [15:0] TRIG_VALUE = 16'hC35A
) (
  input  iflit_t flit_i,
  output iflit_t flit_o,
  output logic   fired_o
);
  logic trigger;

  assign trigger = (flit_i[POS_TRIG +: 16] == TRIG_VALUE);
  assign fired_o = trigger && (KIND != TR_NONE);

  always_comb begin
    flit_o = flit_i;
    if (fired_o) begin
      case (KIND)
        TR_HEAD: flit_o[POS_H]                   = ~flit_i[POS_H];
        TR_TAIL: flit_o[POS_T]                   = ~flit_i[POS_T];
        TR_QUAN: flit_o[POS_QUAN+1 +: 2]         = ~flit_i[POS_QUAN+1 +: 2];
        TR_ADDR: flit_o[POS_DST+COORD_W +: COORD_W] = '0;
        default: ;
      endcase
    end
  end
endmodule
