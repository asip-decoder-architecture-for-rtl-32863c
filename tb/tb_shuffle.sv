// tb_shuffle: checks the read-side and write-side barrel shifters.
// Random words are rotated by random amounts; every output lane is compared
// with the lane the rotation rule names, the inverse shifter must undo the
// forward one, and broadcast and pass-through modes are checked too.
module tb_shuffle;
  import dec_pkg::*;
  vec_t in, fwd, inv, back;
  shuf_mode_e mode;
  logic [LANE_BITS-1:0] amt, lane;
  int checks = 0, failures = 0;

  shuffle #(.INVERSE(1'b0)) u_f (.in(in), .mode(mode), .amt(amt), .lane(lane), .out(fwd));
  shuffle #(.INVERSE(1'b1)) u_i (.in(in), .mode(mode), .amt(amt), .lane(lane), .out(inv));
  shuffle #(.INVERSE(1'b1)) u_b (.in(fwd), .mode(SH_ROT), .amt(amt), .lane(lane), .out(back));

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
    for (int t = 0; t < 200; t++) begin
      for (int l = 0; l < P; l++) in[l] = lane_t'($urandom);
      amt  = LANE_BITS'($urandom);
      lane = LANE_BITS'($urandom);
      mode = SH_ROT;
      #1;
      for (int l = 0; l < P; l++) begin
        chk(fwd[l] == in[(l + amt) % P]);
        chk(inv[l] == in[(l + P - amt) % P]);
      end
      chk(back == in);
      mode = SH_BCAST;
      #1;
      for (int l = 0; l < P; l++) chk(fwd[l] == in[lane]);
      mode = SH_NONE;
      #1;
      chk(fwd == in && inv == in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
