// tb_sfu: self-checking test of the special function unit.
// Hand-worked vectors first, then random sums, shifts and functions against a
// reference written with 64-bit integer division rather than shifts.
module tb_sfu;
  import dla_pkg::*;
  int checks = 0, failures = 0;
  logic signed [31:0] x, y;
  sfu_fn_e fn;
  logic [4:0] sh;

  sfu dut (.x, .fn, .shift(sh), .y);

  function automatic longint floordiv(longint a, longint b);
    longint q = a / b;
    if ((a % b != 0) && (a < 0)) q -= 1;
    return q;
  endfunction

  function automatic longint lim(longint v, longint lo, longint hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic longint ref_sfu(longint xv, int f, int s);
    longint p = longint'(1) << s;
    longint r = floordiv(xv + p / 2, p);   // round half up
    case (f)
      0: return xv;
      2: return lim(r, 0, 127);
      3: return lim(floordiv(r, 4) + 32, 0, 64);
      4: return lim(r, -64, 64);
      default: return lim(r, -128, 127);
    endcase
  endfunction

  task automatic check(longint xv, int f, int s, longint e);
    x = 32'(xv); fn = sfu_fn_e'(f); sh = 5'(s);
    #1;
    checks++;
    if (longint'(y) != e) begin
      failures++;
      $display("sfu fn=%0d shift=%0d x=%0d: got %0d exp %0d", f, s, xv, y, e);
    end
  endtask

  initial begin
    // hand-worked values
    check(1000, 1, 4, 63);     // (1000+8)/16 = 63
    check(-1000, 1, 4, -62);   // (-992)/16 = -62
    check(5000, 1, 4, 127);    // saturates
    check(-5000, 1, 4, -128);
    check(-300, 2, 2, 0);      // ReLU
    check(64, 3, 0, 48);       // 64/4 + 32
    check(-200, 3, 0, 0);
    check(200, 3, 0, 64);
    check(100, 4, 0, 64);
    check(-100, 4, 0, -64);
    check(123456, 0, 7, 123456); // pass-through ignores shift
    for (int n = 0; n < 5000; n++) begin
      automatic longint xv = longint'($signed($urandom)) >>> ($urandom % 20);
      automatic int f = $urandom % 8;
      automatic int s = $urandom % 16;
      check(xv, f, s, ref_sfu(xv, f, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
