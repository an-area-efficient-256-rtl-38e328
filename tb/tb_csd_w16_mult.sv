// tb_csd_w16_mult: checks the W16 constant complex multiplier for each of
// its seven exponents (0,1,2,3,4,6,9) with random 12-bit inputs and the
// extreme corners. The reference is the double-precision product
// d * exp(-j*2*pi*e/16), rounded and clipped to 12 bits. The trivial
// factors 1 and -j must be exact; the others may differ by at most 2 LSB
// (11-bit constants plus one rounding).
module tb_csd_w16_mult;

  localparam int W = 12;
  localparam real PI = 3.14159265358979323846;

  int checks = 0, failures = 0;

  logic [3:0]          e;
  logic signed [W-1:0] in_re, in_im, out_re, out_im;

  csd_w16_mult #(.W(W)) dut (.e, .in_re, .in_im, .out_re, .out_im);

  function automatic int rclip(real v);
    int i;
    i = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
    if (i > 2047) i = 2047;
    if (i < -2048) i = -2048;
    return i;
  endfunction

  int maxerr = 0;

  task automatic check_one(int ee, int a, int b);
    real c, s;
    int  xr, xi, dr, di, tol;
    e     = 4'(ee);
    in_re = W'(a);
    in_im = W'(b);
    #1;
    c  = $cos(2.0 * PI * ee / 16.0);
    s  = $sin(2.0 * PI * ee / 16.0);
    // (a + jb)(c - js)
    xr = rclip(a * c + b * s);
    xi = rclip(b * c - a * s);
    dr = int'(out_re) - xr;  if (dr < 0) dr = -dr;
    di = int'(out_im) - xi;  if (di < 0) di = -di;
    tol = (ee == 0 || ee == 4) ? 0 : 2;
    if (dr > maxerr) maxerr = dr;
    if (di > maxerr) maxerr = di;
    checks++;
    if (dr > tol || di > tol) begin
      failures++;
      if (failures < 20)
        $display("e=%0d d=(%0d,%0d): got (%0d,%0d) expected (%0d,%0d)",
                 ee, a, b, out_re, out_im, xr, xi);
    end
  endtask

  int exps [7] = '{0, 1, 2, 3, 4, 6, 9};
  int corner [5] = '{-2048, -2047, 0, 1, 2047};

  initial begin
    foreach (exps[i]) begin
      foreach (corner[ca]) foreach (corner[cb]) check_one(exps[i], corner[ca], corner[cb]);
      repeat (500) check_one(exps[i], int'($urandom_range(4095)) - 2048,
                             int'($urandom_range(4095)) - 2048);
    end
    $display("max error %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
