// tb_fft256_ofdm: runs the FFT as the demodulator of an OFDM receiver with
// the 256-subcarrier layout of IEEE 802.16 OFDM: 200 used subcarriers at
// offsets -100..-1 and +1..+100, DC and the 55 guard subcarriers empty.
//
// Eight symbols with random QPSK subcarriers (+-1 +-j) are synthesised by
// an ideal inverse DFT in double precision, scaled to about 400 LSB RMS,
// rounded to 12 bits and streamed back to back (the cyclic prefix is
// assumed to be removed already), followed by one flush symbol. For every
// used subcarrier the hard QPSK decision taken from the FFT output must
// equal the transmitted symbol, and the output must lie within 6 LSB of the
// ideal value 20*(+-1 +-j). Empty subcarriers must stay within 6 LSB of
// zero.
module tb_fft256_ofdm;

  localparam int N    = 256;
  localparam int W    = 12;
  localparam int NSYM = 8;
  localparam int AMP  = 20;     // subcarrier amplitude at the FFT output
  localparam int TOL  = 6;
  localparam real PI  = 3.14159265358979323846;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                in_valid = 1'b0;
  logic signed [W-1:0] in_re = '0, in_im = '0;
  logic                in_frame_start;
  logic                out_valid;
  logic [7:0]          out_pos, out_k;
  logic signed [W-1:0] out_re, out_im;

  fft256_sdf dut (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .in_frame_start,
    .out_valid, .out_pos, .out_k, .out_re, .out_im
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  int  sr [NSYM][N];   // transmitted subcarrier signs (0 for empty)
  int  si [NSYM][N];
  int  xr [NSYM+1][N];
  int  xi [NSYM+1][N];
  real ct [N], st [N];
  int  clipped = 0;

  function automatic bit used(int k);
    return (k >= 1 && k <= 100) || (k >= N - 100 && k <= N - 1);
  endfunction

  function automatic int rnd(real v);
    int i;
    i = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
    return i;
  endfunction

  task automatic make_symbols();
    for (int n = 0; n < N; n++) begin
      ct[n] = $cos(2.0 * PI * n / N);
      st[n] = $sin(2.0 * PI * n / N);
    end
    for (int s = 0; s < NSYM; s++) begin
      for (int k = 0; k < N; k++) begin
        sr[s][k] = used(k) ? ($urandom_range(1) ? 1 : -1) : 0;
        si[s][k] = used(k) ? ($urandom_range(1) ? 1 : -1) : 0;
      end
      // x(n) = AMP * sum_k S(k) exp(+j*2*pi*n*k/N); the FFT returns
      // X(k)/N = AMP * S(k).
      for (int n = 0; n < N; n++) begin
        real ar, ai;
        ar = 0.0;
        ai = 0.0;
        for (int k = 0; k < N; k++) begin
          int m;
          m = (n * k) % N;
          ar += sr[s][k] * ct[m] - si[s][k] * st[m];
          ai += sr[s][k] * st[m] + si[s][k] * ct[m];
        end
        xr[s][n] = rnd(AMP * ar);
        xi[s][n] = rnd(AMP * ai);
        if (xr[s][n] > 2047) begin xr[s][n] = 2047; clipped++; end
        if (xr[s][n] < -2048) begin xr[s][n] = -2048; clipped++; end
        if (xi[s][n] > 2047) begin xi[s][n] = 2047; clipped++; end
        if (xi[s][n] < -2048) begin xi[s][n] = -2048; clipped++; end
      end
    end
    for (int n = 0; n < N; n++) begin
      xr[NSYM][n] = 0;
      xi[NSYM][n] = 0;
    end
  endtask

  initial begin
    make_symbols();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s <= NSYM; s++)
      for (int n = 0; n < N; n++) begin
        @(posedge clk);
        in_valid <= 1'b1;
        in_re    <= W'(xr[s][n]);
        in_im    <= W'(xi[s][n]);
      end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (nout != NSYM * N) begin
      failures++;
      $display("received %0d results, expected %0d", nout, NSYM * N);
    end
    $display("symbols %0d, used subcarriers %0d, symbol errors %0d, clipped samples %0d",
             NSYM, nused, sym_err, clipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nout = 0, nused = 0, sym_err = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid && nout < NSYM * N) begin
      int s, k, er, ei, dr, di;
      s  = nout / N;
      k  = int'(out_k);
      er = AMP * sr[s][k];
      ei = AMP * si[s][k];
      dr = int'(out_re) - er;  if (dr < 0) dr = -dr;
      di = int'(out_im) - ei;  if (di < 0) di = -di;
      checks++;
      if (dr > TOL || di > TOL) begin
        failures++;
        if (failures < 20)
          $display("symbol %0d k %0d: got (%0d,%0d) expected (%0d,%0d)",
                   s, k, out_re, out_im, er, ei);
      end
      if (used(k)) begin
        nused++;
        checks++;
        if ((out_re >= 0) != (sr[s][k] > 0) || (out_im >= 0) != (si[s][k] > 0)) begin
          failures++;
          sym_err++;
        end
      end
      nout++;
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
