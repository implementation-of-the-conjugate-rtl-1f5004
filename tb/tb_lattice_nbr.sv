// tb_lattice_nbr: checks the neighbour addresses on two lattices, the
// default 8^4 and a 6x6x6x8 lattice whose extents are not powers of two.
// For every site the expected neighbours are built from the site's
// coordinates, stepped by +-1 modulo the extent in each direction.
module tb_lattice_nbr;
  logic [11:0] site_a;
  logic [11:0] nbr_a [8];
  logic [10:0] site_b;
  logic [10:0] nbr_b [8];
  int checks = 0, failures = 0, wraps = 0;

  lattice_nbr dut_a (.site(site_a), .nbr(nbr_a));
  lattice_nbr #(.LX(6), .LY(6), .LZ(6), .LT(8), .SITE_W(11)) dut_b (.site(site_b), .nbr(nbr_b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_lattice(input int ext [4], input bit which);
    int c [4], d [4], e, idx;
    for (int n = 0; n < ext[0] * ext[1] * ext[2] * ext[3]; n++) begin
      idx = n;
      for (int mu = 0; mu < 4; mu++) begin c[mu] = idx % ext[mu]; idx = idx / ext[mu]; end
      if (which) site_b = 11'(n); else site_a = 12'(n);
      #1;
      for (int k = 0; k < 8; k++) begin
        d = c;
        if (k < 4) d[k] = (c[k] + 1) % ext[k];
        else       d[k-4] = (c[k-4] + ext[k-4] - 1) % ext[k-4];
        if (k < 4 ? c[k] == ext[k] - 1 : c[k-4] == 0) wraps++;
        e = d[0] + ext[0] * (d[1] + ext[1] * (d[2] + ext[2] * d[3]));
        checks++;
        if ((which ? int'(nbr_b[k]) : int'(nbr_a[k])) != e) begin
          failures++;
          if (failures < 6) $display("lattice %0d site %0d term %0d: got %0d expected %0d", which, n, k,
                                     which ? int'(nbr_b[k]) : int'(nbr_a[k]), e);
        end
      end
    end
  endtask

  initial begin
    check_lattice('{8, 8, 8, 8}, 1'b0);
    check_lattice('{6, 6, 6, 8}, 1'b1);
    $display("boundary wraps checked: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
