// tb_csd_const_mult: checks the shift-and-add constant multiplier against
// floor(x*C / 2**F) computed with a 64-bit product, for several constants
// (positive, negative, zero, a power of two, long 12-bit values) and random
// signed inputs spanning the internal word range.
module tb_csd_const_mult;
  import iir_pkg::*;

  localparam int NC = 7;
  localparam int CS [NC] = '{77, -93, 0, 256, 3594, -1, 2595};
  localparam int FS [NC] = '{8, 8, 8, 8, 12, 8, 12};

  logic signed [IW-1:0] x;
  logic signed [IW-1:0] y [NC];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NC; i++) begin : g_dut
    csd_const_mult #(.C(CS[i]), .F(FS[i]), .IW_X(IW), .OW(IW)) u_dut (.x(x), .y(y[i]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ref_v;
    for (int n = 0; n < 2000; n++) begin
      case (n)
        0: x = '0;
        1: x = 1;
        2: x = -1;
        default: x = IW'($signed($urandom) >>> ($urandom_range(0, 12) + 8));
      endcase
      #1;
      for (int i = 0; i < NC; i++) begin
        ref_v = (longint'(x) * longint'(CS[i])) >>> FS[i];
        checks++;
        if (longint'(y[i]) != ref_v) begin
          failures++;
          if (failures < 10) $display("mismatch C=%0d x=%0d got %0d exp %0d", CS[i], x, y[i], ref_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
