// match_logic: equality comparator, the basic element of the CAM.
// Each bit pair a[i], b[i] goes through an XOR gate whose output is inverted;
// an AND of all inverted outputs is high only when every bit agrees. The
// 2-bit default is the unit the design starts from; the CAM rows use the same
// structure at the full word width. Purely combinational, no clock.
module match_logic #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             match
);
  logic [WIDTH-1:0] diff;   // XOR outputs, 1 where the bits differ
  logic [WIDTH-1:0] same;   // inverted XOR outputs

  always_comb begin
    diff  = a ^ b;
    same  = ~diff;
    match = &same;
  end
endmodule
