// Self-checking testbench for sand_autocut: random and corner 40-bit sums,
// all window positions, with and without rounding, against a 64-bit
// reference model (arithmetic shift, saturation to the 16-bit range).
module tb_sand_autocut;
  import sand_pkg::*;

  acc_t        acc;
  logic [4:0]  shift;
  logic        rnd;
  word_t       y;
  logic        ovf, unf;
  int          checks = 0, failures = 0;
  int          n_ovf = 0, n_unf = 0;

  sand_autocut dut (.acc, .shift, .rnd, .y, .ovf, .unf);

  task automatic check_one(input longint a, input int sh, input bit r);
    longint q, e;
    int     s;
    acc   = AW'(a);
    shift = 5'(sh);
    rnd   = r;
    #1;
    s = (sh > 24) ? 24 : sh;
    q = longint'(acc);                   // sign-extended
    if (r && s > 0) q = q + (64'sd1 <<< (s - 1));
    q = q >>> s;
    e = (q > 32767) ? 32767 : (q < -32768) ? -32768 : q;
    checks++;
    if (longint'(y) != e || ovf != (q > 32767) || unf != (q < -32768)) begin
      failures++;
      if (failures < 10)
        $display("FAIL acc=%0d sh=%0d rnd=%0b y=%0d exp=%0d ovf=%0b unf=%0b",
                 a, sh, r, y, e, ovf, unf);
    end
    if (ovf) n_ovf++;
    if (unf) n_unf++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corners
    check_one(0, 0, 0);
    check_one(32767, 0, 0);
    check_one(32768, 0, 0);
    check_one(-32768, 0, 0);
    check_one(-32769, 0, 0);
    check_one(5, 1, 1);        // 2.5 -> 3
    check_one(-5, 1, 1);       // -2.5 -> -2
    check_one(5, 1, 0);        // 2.5 -> 2
    check_one(longint'(40'sh7f_ffff_ffff), 24, 0);
    check_one(-longint'(40'sh80_0000_0000), 24, 1);
    check_one(1000, 31, 1);    // shift clamps to 24
    for (int i = 0; i < 3000; i++) begin
      longint a;
      int sh;
      a  = longint'({$urandom, $urandom}) >>> ($urandom_range(24, 63));
      sh = $urandom_range(0, 26);
      check_one(a, sh, 1'($urandom));
    end
    if (n_ovf == 0 || n_unf == 0) begin
      failures++;
      $display("FAIL saturation never exercised ovf=%0d unf=%0d", n_ovf, n_unf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
