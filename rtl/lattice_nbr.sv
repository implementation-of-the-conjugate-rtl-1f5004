// lattice_nbr: neighbour addresses of a site on the periodic 4-d lattice.
//
// Sites are numbered lexicographically, n = x + LX*(y + LY*(z + LZ*t)).
// For site n it returns nbr[mu] = n + mu-hat and nbr[4+mu] = n - mu-hat for
// mu = 0..3 (x, y, z, t), wrapping around at the lattice boundary
// (periodic boundary conditions, a choice of this design). The coordinates
// come from division by the constant extents; purely combinational.
module lattice_nbr #(
  parameter int LX = 8,
  parameter int LY = 8,
  parameter int LZ = 8,
  parameter int LT = 8,
  parameter int SITE_W = $clog2(LX * LY * LZ * LT)
) (
  input  logic [SITE_W-1:0] site,
  output logic [SITE_W-1:0] nbr [8]
);

  localparam int EXT    [4] = '{LX, LY, LZ, LT};
  localparam int STRIDE [4] = '{1, LX, LX * LY, LX * LY * LZ};

  for (genvar mu = 0; mu < 4; mu++) begin : g_dir
    localparam int E = EXT[mu];
    localparam int S = STRIDE[mu];
    logic [SITE_W-1:0] coord;

    assign coord       = SITE_W'((int'(site) / S) % E);
    assign nbr[mu]     = (coord == SITE_W'(E - 1)) ? SITE_W'(int'(site) - (E - 1) * S)
                                                   : SITE_W'(int'(site) + S);
    assign nbr[4 + mu] = (coord == '0) ? SITE_W'(int'(site) + (E - 1) * S)
                                       : SITE_W'(int'(site) - S);
  end

endmodule
