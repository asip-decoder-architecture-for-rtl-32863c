// tb_trellis_connect: checks the butterfly routing for 8, 16, 32 and 64
// states. The expected routing is derived independently: for every state j
// and input bit u the successor state is ((j << 1) | u) mod N inside its
// group of N lanes; the successor must see the candidate of the smaller
// predecessor on `ta` and of the larger one on `tb`. Straight mode is checked
// as well.
module tb_trellis_connect;
  import dec_pkg::*;
  s1_out_t s1 [P];
  s2_in_t  s2 [P];
  logic trellis;
  logic [2:0] lg;
  int checks = 0, failures = 0;

  trellis_connect dut (.s1(s1), .trellis(trellis), .lg_states(lg), .s2(s2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok);
    checks++;
    if (!ok) failures++;
  endtask

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int l = 0; l < P; l++) begin
        s1[l] = '0;
        s1[l].cand0 = dval_t'(l * 2 + 1000 * rep);
        s1[l].cand1 = dval_t'(l * 2 + 1 + 1000 * rep);
        s1[l].acc   = dval_t'($urandom);
      end
      for (int g = 3; g <= 6; g++) begin
        automatic int n = 1 << g;
        int first [P];
        bit seen  [P];
        lg = 3'(g);
        trellis = 1'b1;
        #1;
        foreach (seen[i]) seen[i] = 0;
        for (int j = 0; j < P; j++) begin
          for (int u = 0; u < 2; u++) begin
            automatic int base = j - (j % n);
            automatic int k = base + ((((j % n) << 1) | u) % n);
            automatic dval_t c = u ? s1[j].cand1 : s1[j].cand0;
            if (!seen[k]) begin
              seen[k] = 1;
              first[k] = j;
              chk(s2[k].ta == c);
            end else begin
              chk(j > first[k]);
              chk(s2[k].tb == c);
            end
          end
        end
        for (int k = 0; k < P; k++) chk(s2[k].own == s1[k]);
      end
      trellis = 1'b0;
      #1;
      for (int k = 0; k < P; k++) chk(s2[k].ta == s1[k].cand0 && s2[k].tb == s1[k].cand1 && s2[k].own == s1[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
