// tb_wmux_tree: exhaustive check of the 3-input example tree (leaf weights
// 2/8, 5/8, 1/8: leaves m1 m1 m2 m2 m2 m2 m2 m3) over all data and select
// values, and of a 25-input, 1024-leaf tree with the default FIR leaf counts
// over all selects: the output must be the data input that owns leaf sel.
module tb_wmux_tree;
  localparam int NB = 25;
  localparam int unsigned LV [NB] = '{1, 1, 0, 3, 8, 17, 30, 46, 64, 82, 97, 107, 111,
                                      107, 97, 82, 64, 46, 30, 17, 8, 3, 0, 1, 2};
  logic [2:0]    m3;
  logic [2:0]    sel3;
  logic          s3;
  logic [NB-1:0] mb;
  logic [9:0]    selb;
  logic          sb;
  int checks = 0, failures = 0;

  wmux_tree u_small (.m(m3), .sel(sel3), .s(s3));
  wmux_tree #(.NIN(NB), .K(10), .LEAVES(LV)) u_big (.m(mb), .sel(selb), .s(sb));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int owner3 [8] = '{0, 0, 1, 1, 1, 1, 1, 2};
    for (int d = 0; d < 8; d++) begin
      for (int s = 0; s < 8; s++) begin
        m3 = 3'(d);
        sel3 = 3'(s);
        #1;
        checks++;
        if (s3 != m3[owner3[s]]) begin
          failures++;
          $display("FAIL small m=%b sel=%0d s=%b", m3, s, s3);
        end
      end
    end
    for (int t = 0; t < 4; t++) begin
      mb = NB'({$urandom, $urandom});
      for (int s = 0; s < 1024; s++) begin
        int acc, own;
        acc = 0;
        own = -1;
        for (int i = 0; i < NB; i++) begin
          acc += int'(LV[i]);
          if (own < 0 && s < acc) own = i;
        end
        selb = 10'(s);
        #1;
        checks++;
        if (sb != mb[own]) begin
          failures++;
          $display("FAIL big sel=%0d owner=%0d s=%b", s, own, sb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
