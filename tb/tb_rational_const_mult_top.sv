// tb_rational_const_mult_top -- end-to-end test of the top at its default
// configuration (x * 7/5, IEEE single precision).  Every input goes through
// both significand multipliers; both results must equal the exact
// correctly rounded reference.  The test counts how often each mechanism
// occurred and fails if one never did: products in the lower and the upper
// binade, round-ups, round-downs, exact ties resolved downwards and upwards
// (to even), exponent overflow to infinity, and zero, subnormal, infinite
// and NaN inputs.  A rounding carry into the next binade cannot occur for
// 7/5 with equal input and output precision (7x/5 is never within half an
// ulp below a power of two), so it is counted and reported but not required.
module tb_rational_const_mult_top;
  import tb_ref_pkg::*;
  import rational_const_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  logic [31:0]  x, y_sa, y_kcm;
  logic [127:0] yref;
  round_info_t  info_sa, info_kcm;
  logic [23:0]  sig;
  logic [7:0]   ex;
  int           sel;

  rational_const_mult_top dut (
    .x(x), .y_sa(y_sa), .y_kcm(y_kcm), .info_sa(info_sa), .info_kcm(info_kcm));

  typedef enum int {
    M_LO, M_HI, M_UP, M_DOWN, M_TIE_DOWN, M_TIE_UP, M_OVF,
    M_ZERO, M_SUB, M_INF, M_NAN, M_CARRY, M_COUNT
  } mech_e;
  int    cnt [M_COUNT];
  string names [M_COUNT] = '{"lower binade", "upper binade", "round up", "round down",
                             "tie to even (down)", "tie to even (up)", "overflow to infinity",
                             "zero input", "subnormal input", "infinite input", "NaN input",
                             "rounding carry"};

  initial begin
    foreach (cnt[k]) cnt[k] = 0;
    for (int n = 0; n < 20000; n++) begin
      x   = $urandom;
      sig = 24'($urandom);
      if (n % 4 == 1) begin
        // a significand that is a multiple of 5 and odd: 7/5 * sig is an
        // odd integer, an exact midpoint when it needs 25 bits
        sig = sig / 24'd10 * 24'd10 + 24'd5;
      end
      sig[23] = 1'b1;
      x[22:0] = sig[22:0];
      sel = int'($urandom % 16);
      case (sel)
        0: ex = 8'd0;
        1: ex = 8'd255;
        2: ex = 8'd254 - 8'($urandom % 2);
        default: ex = 8'($urandom % 254 + 1);
      endcase
      x[30:23] = ex;
      if (sel <= 1 && $urandom % 2 == 0) x[22:0] = '0;   // zero or infinity
      if (n == 0) x = 32'h0000_0000;
      if (n == 1) x = 32'h7f80_0000;
      ex = x[30:23];
      @(posedge clk);
      yref = fp_ref(128'(x), 8, 23, 7, 5);
      checks += 2;
      if (128'(y_sa) != yref) begin
        failures++;
        if (failures < 5) $display("FAIL shift-and-add x=%h y=%h exp=%h", x, y_sa, yref[31:0]);
      end
      if (128'(y_kcm) != yref) begin
        failures++;
        if (failures < 5) $display("FAIL KCM x=%h y=%h exp=%h", x, y_kcm, yref[31:0]);
      end
      if (ex == 8'd0) begin
        if (x[22:0] == '0) cnt[M_ZERO]++; else cnt[M_SUB]++;
      end else if (ex == 8'd255) begin
        if (x[22:0] == '0) cnt[M_INF]++; else cnt[M_NAN]++;
      end else begin
        if (y_sa[30:23] == 8'd255) cnt[M_OVF]++;
        if (info_sa.hi) cnt[M_HI]++; else cnt[M_LO]++;
        if (info_sa.carry) cnt[M_CARRY]++;
        if (info_sa.tie) begin
          if (info_sa.up) cnt[M_TIE_UP]++; else cnt[M_TIE_DOWN]++;
        end else if (info_sa.up) cnt[M_UP]++;
        else cnt[M_DOWN]++;
        // both multipliers must take the same rounding decisions
        checks++;
        if (info_sa != info_kcm) begin
          failures++;
          if (failures < 5) $display("FAIL rounding reports differ x=%h", x);
        end
      end
    end
    for (int k = 0; k < M_COUNT; k++) begin
      $display("mechanism %-22s %0d", names[k], cnt[k]);
      if (k != M_CARRY) begin
        checks++;
        if (cnt[k] == 0) begin
          failures++;
          $display("FAIL mechanism never occurred: %s", names[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
