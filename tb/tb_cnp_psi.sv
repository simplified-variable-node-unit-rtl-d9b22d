// tb_cnp_psi: random trellises with many ties (small value range and full
// range); checks m1, its first column and m2 of every row.
module tb_cnp_psi;
  import tb_ref_pkg::*;
  localparam int Q = 32, W = 5, DC = 27, CW = $clog2(DC + 1);
  int checks = 0, failures = 0;
  logic [DC-1:0][Q-1:0][W-1:0] dq;
  logic [Q-1:0][W-1:0]  m1, m2;
  logic [Q-1:0][CW-1:0] icol;

  cnp_psi #(.Q(Q), .W(W), .DC(DC)) dut (.dq(dq), .m1(m1), .icol(icol), .m2(m2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      for (int j = 0; j < DC; j++)
        for (int a = 0; a < Q; a++)
          dq[j][a] = (t % 2) ? W'($urandom) : W'($urandom_range(3) + 4);
      #1;
      for (int a = 0; a < Q; a++) begin
        int v[32];
        int rm1, rcol, rm2;
        for (int j = 0; j < DC; j++) v[j] = int'(dq[j][a]);
        ref_psi(v, DC, rm1, rcol, rm2);
        checks += 3;
        if (int'(m1[a]) != rm1)   failures++;
        if (int'(icol[a]) != rcol) failures++;
        if (int'(m2[a]) != rm2)   failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
