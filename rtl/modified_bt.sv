// modified_bt: the "modified bit transformation" (MBT) used by the bi-coupled
// generator to spread its output uniformly.
//
// For x = b[W-1] .. b[0]:
//   f_l  = b[0] b[1] .. b[W/2-1]          (low half, bit order reversed)
//   f_h  = b[W-1] .. b[W/2] XOR f_l       (high half XOR the reversed low half)
//   MBT  = {f_h, f_l}
// This follows the document's equations; W must be even.  Combinational.
module modified_bt #(
  parameter int unsigned W = hub_pkg::HUB_W
) (
  input  logic [W-1:0] x_i,
  output logic [W-1:0] y_o
);
  localparam int unsigned H = W / 2;
  logic [H-1:0] f_l;
  logic [H-1:0] f_h;

  always_comb begin
    for (int i = 0; i < H; i++) f_l[H-1-i] = x_i[i];
    f_h = x_i[W-1:H] ^ f_l;
    y_o = {f_h, f_l};
  end

  if (W % 2 != 0) begin : g_bad_width
    $error("modified_bt: W must be even");
  end
endmodule
