// tb_dn_path: random bases of GF(32). For every nonzero element the marked
// deviations must select basic-set elements whose XOR is that element, and
// each marked deviation must carry that element's column; unmarked slots
// must hold the value that matches no column.
module tb_dn_path;
  import tb_ref_pkg::*;
  localparam int P = 5, DC = 27, Q = 1 << P, CW = $clog2(DC + 1);
  localparam int NONE = (1 << CW) - 1;
  int checks = 0, failures = 0;
  logic [P-1:0][P-1:0]         bs_sym;
  logic [P-1:0][CW-1:0]        bs_col;
  logic [Q-1:0][P-1:0][CW-1:0] d;

  dn_path #(.P(P), .DC(DC)) dut (.bs_sym(bs_sym), .bs_col(bs_col), .d(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      int basis[8];
      for (int i = 0; i < P; i++) begin
        int x;
        do x = int'($urandom_range(Q - 1, 1)); while (in_span(x, basis, i));
        basis[i] = x;
        bs_sym[i] = P'(x);
        bs_col[i] = CW'($urandom_range(DC - 1));
      end
      #1;
      for (int a = 1; a < Q; a++) begin
        automatic int x = 0;
        for (int l = 0; l < P; l++) begin
          if (int'(d[a][l]) != NONE) begin
            x ^= basis[l];
            checks++;
            if (d[a][l] != bs_col[l]) failures++;
          end
        end
        checks++;
        if (x != a) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
