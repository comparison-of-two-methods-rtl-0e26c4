// tb_mult_block: drives random words into two five-constant multiplier
// blocks - the default one, and the last section of the ninth-order halfband
// cascade, whose graph sits at an offset inside that filter's tables - and
// compares every output with floor(x*C[i] / 2**8) from a 64-bit product.
module tb_mult_block;
  import iir_pkg::*;
  import example_coef_pkg::*;

  localparam int N = 5;
  localparam int C [N] = '{67, -48, 67, 261, -92};
  localparam int D [N] = '{133, 215, 133, 0, -225};

  logic signed [IW-1:0] x;
  logic signed [IW-1:0] y [N];
  logic signed [IW-1:0] z [N];
  int checks = 0, failures = 0;

  mult_block #(.N(N), .F(8), .C(C)) u_dut (.x(x), .y(y));
  mult_block #(.N(N), .F(8), .C(D), .NF(EX3A_NF[4]), .NG(EX3A_NG), .G(EX3A_G),
               .G_OFF(6 * (EX3A_NF[0] + EX3A_NF[1] + EX3A_NF[2] + EX3A_NF[3])),
               .NO(EX3A_N * 15), .O(EX3A_O), .O_OFF(60)) u_dut2 (.x(x), .y(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ref_v;
    for (int n = 0; n < 2000; n++) begin
      x = IW'($signed($urandom) >>> ($urandom_range(0, 12) + 8));
      #1;
      for (int i = 0; i < N; i++) begin
        ref_v = (longint'(x) * longint'(C[i])) >>> 8;
        checks++;
        if (longint'(y[i]) != ref_v) begin
          failures++;
          if (failures < 10) $display("mismatch i=%0d x=%0d got %0d exp %0d", i, x, y[i], ref_v);
        end
        ref_v = (longint'(x) * longint'(D[i])) >>> 8;
        checks++;
        if (longint'(z[i]) != ref_v) begin
          failures++;
          if (failures < 10) $display("mismatch block 2 i=%0d x=%0d got %0d exp %0d", i, x, z[i], ref_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
