// dx_control: control unit of the decompressor.
// Decodes each valid compressed word (start_de): on a match hit the output is
// taken from the dictionary at addrin (sel_dict); on a miss the literal is
// taken and stored in the dictionary (push). load tells the output register
// to update. A miss must carry the address where the compressor stored the
// word, which is the local write pointer; sync_err flags a miss whose address
// differs, meaning the two dictionaries have drifted apart. Combinational.
module dx_control #(
  parameter int unsigned ADDR_W = xm_pkg::XM_ADDR_W
) (
  input  logic              start_de,
  input  logic              matchhit,
  input  logic [ADDR_W-1:0] addrin,
  input  logic [ADDR_W-1:0] wr_ptr,
  output logic              push,
  output logic              sel_dict,
  output logic              load,
  output logic              sync_err
);
  always_comb begin
    load     = start_de;
    sel_dict = start_de && matchhit;
    push     = start_de && !matchhit;
    sync_err = push && (addrin != wr_ptr);
  end
endmodule
