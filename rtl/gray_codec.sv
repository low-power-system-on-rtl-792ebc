// gray_codec: Gray encoder (DECODE = 0) or decoder (DECODE = 1) for the
// address lines of the local bus. Sequential word addresses then differ in
// a single line per step, which cuts address-bus transitions. The two byte
// offset bits are passed unchanged and only the word address [W-1:2] is
// coded, so a run of word accesses is a Gray count. No redundancy lines,
// purely combinational.
module gray_codec #(
  parameter int unsigned W      = 32,
  parameter bit          DECODE = 1'b0
) (
  input  logic [W-1:0] in_bus,
  output logic [W-1:0] out_bus
);
  logic [W-3:0] wi, wo;
  assign wi = in_bus[W-1:2];
  always_comb begin
    if (!DECODE) wo = wi ^ (wi >> 1);
    else begin
      wo[W-3] = wi[W-3];
      for (int i = W - 4; i >= 0; i--) wo[i] = wo[i+1] ^ wi[i];
    end
  end
  assign out_bus = {wo, in_bus[1:0]};
endmodule
