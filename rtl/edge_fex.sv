// edge_fex -- occupancy information exchanged with neighbouring FLINKs.
//
// Software decides whether to feature-extract a crystal from the FEX bits of
// the crystal and its eight neighbours.  Neighbours that belong to another
// FLINK are approximated by ten edge FEX bits, each the OR of the FEX bits
// along one part of the tower edge: north1, north2, north-east, east,
// south-east, south1, south2, south-west, west, north-west.  The ten bits
// leave towards the neighbours and ten matching bits arrive from them (the
// backplane routes them, so this logic does not depend on where the tower
// sits).
//
// Geometry: the tower is COLS x ROWS crystals (8 x 3 in the barrel), crystal n
// at column n / ROWS and row n % ROWS, row 0 on the north edge and column 0
// on the west edge.  north1/south1 cover columns 0..COLS/2 of the
// top/bottom row and north2/south2 columns COLS/2-1..COLS-1: the two halves
// overlap by one column each way, so a crystal of the neighbouring tower
// above any column finds all three of its neighbours in this tower inside
// one bit.  east and west cover a whole column; each corner bit is its
// corner crystal.
//
// Outputs: edge_out[0..9] in the order above, local_any (any FEX bit of this
// tower) and neigh_any (any incoming edge bit), all combinational.
//
// The ten edges, their order and their extents (including the one-column
// overlap of the north and south halves) follow the document's barrel
// figure; the crystal-number-to-position mapping is not given there and is
// this design's choice.
module edge_fex
  import upc_pkg::*;
#(
  parameter int COLS = 8,
  parameter int ROWS = 3
) (
  input  logic [COLS*ROWS-1:0] fex,
  input  logic [N_EDGE-1:0]    edge_in,
  output logic [N_EDGE-1:0]    edge_out,
  output logic                 local_any,
  output logic                 neigh_any
);

  localparam int HALF = COLS / 2;

  function automatic logic at(input logic [COLS*ROWS-1:0] f, input int c, input int r);
    return f[c*ROWS + r];
  endfunction

  always_comb begin
    edge_out = '0;
    for (int c = 0; c < COLS; c++) begin
      if (c <= HALF) begin
        edge_out[0] |= at(fex, c, 0);          // north1
        edge_out[5] |= at(fex, c, ROWS-1);     // south1
      end
      if (c >= HALF - 1) begin
        edge_out[1] |= at(fex, c, 0);          // north2
        edge_out[6] |= at(fex, c, ROWS-1);     // south2
      end
    end
    for (int r = 0; r < ROWS; r++) begin
      edge_out[3] |= at(fex, COLS-1, r);       // east
      edge_out[8] |= at(fex, 0, r);            // west
    end
    edge_out[2] = at(fex, COLS-1, 0);          // north-east
    edge_out[4] = at(fex, COLS-1, ROWS-1);     // south-east
    edge_out[7] = at(fex, 0, ROWS-1);          // south-west
    edge_out[9] = at(fex, 0, 0);               // north-west
  end

  assign local_any = |fex;
  assign neigh_any = |edge_in;

endmodule
