// Testbench for codeword_verifier at lifting factor Z = 8 and at the full
// Z = 44: random codewords from the reference encoder must be reported valid
// with every check satisfied, and words with random bit flips must be
// rejected exactly when the reference syndrome is nonzero, with the failing
// check rows matching.
`include "tb_common.svh"
`include "ldpc_tb_util.svh"
module tb_codeword_verifier;
  import ldpc_pkg::*;
  `TB_DECLS
  `WATCHDOG(100000)

  localparam int ZS = 8, ZF = 44;
  logic [NB*ZS-1:0] bits_s;
  logic [MB*ZS-1:0] ok_s;
  logic             valid_s;
  logic [NB*ZF-1:0] bits_f;
  logic [MB*ZF-1:0] ok_f;
  logic             valid_f;
  codeword_verifier #(.Z(ZS)) dut_s (.bits(bits_s), .check_ok(ok_s), .valid(valid_s));
  codeword_verifier #(.Z(ZF)) dut_f (.bits(bits_f), .check_ok(ok_f), .valid(valid_f));

  task automatic trial(input int z, input int nflip);
    bit cw [];
    int sw, nbad;
    cw = new[NB * z];
    ldpc_encode(z, cw);
    `CHECK(ldpc_syndrome_weight(z, cw) == 0, "reference encoder gives a codeword")
    for (int f = 0; f < nflip; f++) begin
      int v = $urandom_range(0, NB * z - 1);
      cw[v] = !cw[v];
    end
    sw = ldpc_syndrome_weight(z, cw);
    for (int v = 0; v < NB * z; v++)
      if (z == ZS) bits_s[v] = cw[v]; else bits_f[v] = cw[v];
    #1;
    nbad = 0;
    for (int r = 0; r < MB * z; r++) nbad += int'(z == ZS ? !ok_s[r] : !ok_f[r]);
    `CHECK(nbad == sw, $sformatf("Z=%0d flips=%0d: failing checks %0d expected %0d", z, nflip, nbad, sw))
    `CHECK((z == ZS ? valid_s : valid_f) == (sw == 0), $sformatf("Z=%0d flips=%0d valid", z, nflip))
  endtask

  initial begin
    bits_s = '0; bits_f = '0;
    #1;
    `CHECK(valid_s && valid_f, "all-zero word is a codeword")
    for (int i = 0; i < 40; i++) begin
      trial(ZS, 0);
      trial(ZS, 1 + i % 4);
      trial(ZF, 0);
      trial(ZF, 1 + i % 4);
    end
    `TB_DONE
  end
endmodule
