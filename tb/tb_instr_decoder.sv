// tb_instr_decoder: random 32-bit instructions; each field and derived value
// is recomputed here from the bit layout and compared. Also checks that
// every operation code is classified and both flag values of each 1-bit
// field occur.
module tb_instr_decoder;
  import cnn_pkg::*;
  logic [31:0] instr;
  dec_t        dec;
  logic        valid;
  int checks = 0, failures = 0;
  int seen_k5 = 0, seen_pad = 0, seen_s2 = 0, seen_rev = 0, seen_invalid = 0;

  instr_decoder dut (.instr, .dec, .valid);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("%s: got %0d expected %0d (instr %08h)", what, got, expv, instr);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int op, n, c, fl, ks, pd, st, k, p, s, o, act, vop;
      instr = $urandom;
      if (t < 16) instr[31:28] = 4'(t);
      if (t % 7 == 0) instr[27:21] = 7'($urandom_range(1, 6));   // small maps
      #1;
      op = int'(instr[31:28]); n = int'(instr[27:21]); c = int'(instr[20:12]); fl = int'(instr[11:3]);
      ks = int'(instr[2]); pd = int'(instr[1]); st = int'(instr[0]);
      k = (ks != 0) ? 5 : 3;
      p = (pd != 0) ? (k - 1) / 2 : 0;
      s = (st != 0) ? 2 : 1;
      o = (n + 2 * p >= k) ? (n + 2 * p - k) / s + 1 : 0;
      vop = int'(op inside {1, 2, 3, 9, 10, 11});
      act = (vop != 0) ? (op % 8) - 1 : 0;
      check("fm_size", int'(dec.fm_size), n);
      check("in_ch", int'(dec.in_ch), c);
      check("filters", int'(dec.filters), fl);
      check("k", int'(dec.k), k);
      check("kk", int'(dec.kk), k * k);
      check("pad", int'(dec.pad), p);
      check("stride", int'(dec.stride), s);
      check("out_size", int'(dec.out_size), o);
      check("valid_op", int'(dec.valid_op), vop);
      check("act", int'(dec.act), act);
      check("reverse", int'(dec.reverse), op / 8);
      check("valid", int'(valid), int'(vop != 0 && o > 0 && c > 0 && fl > 0));
      if (ks != 0) seen_k5++;
      if (pd != 0) seen_pad++;
      if (st != 0) seen_s2++;
      if (vop != 0 && op >= 8) seen_rev++;
      if (!valid) seen_invalid++;
    end
    check("5x5 seen", int'(seen_k5 > 0), 1);
    check("padding seen", int'(seen_pad > 0), 1);
    check("stride 2 seen", int'(seen_s2 > 0), 1);
    check("reverse seen", int'(seen_rev > 0), 1);
    check("invalid seen", int'(seen_invalid > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
