// tb_fft1024: runs a complete 1024-point radix-4 decimation-in-time FFT
// through the MRRNS processor at its default parameters, one butterfly
// output (a complex inner product of length 4) at a time.
//
// Data: 14-bit complex input (a sine plus pseudo-random noise), placed in
// base-4 digit-reversed order. Stage 1 uses the DFT units +-1, +-j as its
// coefficients and is not scaled; stages 2 to 5 use twiddle factors
// quantised to round(65535 * exp(-2 pi i n / L)) and multiplied exactly by
// the DFT unit. Stages 2, 3 and 4 are scaled by 2^18, stage 5 is not. Between
// stages the processor's re-encoded output polynomial (y_poly) is decoded
// and fed back as the next stage's data.
//
// Every processor result is compared bit for bit with the reference model.
// The final spectrum must match a double-precision DFT times the overall
// gain 65535^4 / 2^54 with an error well below the 16-bit level; the bench
// prints the signal-to-error ratio. RNS overflows (coefficient sums that
// wrap modulo 105) are counted and reported.
module tb_fft1024;
  import mrrns_pkg::*;
  import mrrns_ref_pkg::*;

  localparam int    STAGES = 5;
  localparam int    N      = 1 << (2 * STAGES);
  localparam int    LAT    = 5;
  localparam real   PI     = 3.14159265358979323846;
  localparam real   TW     = 65535.0;

  logic clk = 1'b0;
  logic rst_n, in_valid, scale_en;
  logic signed [DATA_W-1:0] x_re, x_im, c_re, c_im;
  logic out_valid;
  logic signed [VALUE_W-1:0] y_re, y_im;
  cpoly_t y_poly;
  logic [1:0] y_clip;

  mrrns_processor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, wraps = 0, clips = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  longint dr [N], di [N];           // working data
  longint nr [N], ni [N];           // next stage
  real    in_r [N], in_i [N];       // natural-order input

  // expected results of the blocks in flight
  longint q_re[$], q_im[$];
  int     q_idx[$];
  bit     last_stage;

  function automatic int digit_rev(int i);
    int r;
    r = 0;
    for (int d = 0; d < STAGES; d++) begin
      r = (r << 2) | (i & 3);
      i = i >> 2;
    end
    return r;
  endfunction

  function automatic longint poly_value(rpoly_t d);
    longint v;
    v = 0;
    for (int k = 0; k < NDIG; k++) v += longint'(d[k]) <<< k;
    return v;
  endfunction

  // output collector
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      longint er, ei;
      int idx;
      er  = q_re.pop_front();
      ei  = q_im.pop_front();
      idx = q_idx.pop_front();
      check(y_re == er && y_im == ei, $sformatf("output %0d: (%0d, %0d) exp (%0d, %0d)", idx, y_re, y_im, er, ei));
      if (y_clip != 2'b00 && !last_stage) clips++;
      if (last_stage) begin
        nr[idx] = y_re;
        ni[idx] = y_im;
      end else begin
        nr[idx] = poly_value(y_poly[0]);
        ni[idx] = poly_value(y_poly[1]);
        check(nr[idx] == mrrns_ref::sat17(er) && ni[idx] == mrrns_ref::sat17(ei), "re-encoded output");
      end
    end
  end

  initial begin
    real err2, sig2, snr_db;
    rst_n = 1'b0;
    in_valid = 1'b0;
    scale_en = 1'b0;
    {x_re, x_im, c_re, c_im} = '0;
    last_stage = 1'b0;
    // input: sine at bin 37 (amplitude 3000) plus noise, 14-bit parts
    for (int i = 0; i < N; i++) begin
      in_r[i] = $rtoi(3000.0 * $cos(2.0 * PI * 37.0 * i / N)) + int'($urandom_range(8000, 0)) - 4000;
      in_i[i] = $rtoi(3000.0 * $sin(2.0 * PI * 37.0 * i / N)) + int'($urandom_range(8000, 0)) - 4000;
    end
    for (int i = 0; i < N; i++) begin
      dr[digit_rev(i)] = longint'(in_r[i]);
      di[digit_rev(i)] = longint'(in_i[i]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    for (int s = 1; s <= STAGES; s++) begin
      int L, Lq;
      bit sc;
      L  = 1 << (2 * s);
      Lq = L / 4;
      sc = (s >= 2 && s <= 4);
      last_stage = (s == STAGES);
      for (int g = 0; g < N; g += L)
        for (int j = 0; j < Lq; j++)
          for (int k = 0; k < 4; k++) begin
            mrrns_ref r;
            int cr [4], ci [4], pr [31], pi [31];
            r = new();
            for (int m = 0; m < 4; m++) begin
              int wr, wi, t;
              if (s == 1) begin
                wr = 1;
                wi = 0;
              end else begin
                wr = $rtoi(TW * $cos(2.0 * PI * j * m / L) + ((TW * $cos(2.0 * PI * j * m / L) >= 0) ? 0.5 : -0.5));
                wi = $rtoi(-TW * $sin(2.0 * PI * j * m / L) + ((-TW * $sin(2.0 * PI * j * m / L) >= 0) ? 0.5 : -0.5));
              end
              // multiply by (-j)^(k*m)
              for (int q = 0; q < (k * m) % 4; q++) begin
                t  = wr;
                wr = wi;
                wi = -t;
              end
              cr[m] = wr;
              ci[m] = wi;
              r.add_term(int'(dr[g + j + m * Lq]), int'(di[g + j + m * Lq]), wr, wi);
            end
            r.finish();
            if (r.wraps != 0) wraps++;
            for (int e = 0; e < 31; e++) begin
              pr[e] = r.wr_re[e];
              pi[e] = r.wr_im[e];
            end
            q_re.push_back(mrrns_ref::scale(pr, sc ? 18 : 0));
            q_im.push_back(mrrns_ref::scale(pi, sc ? 18 : 0));
            q_idx.push_back(g + j + k * Lq);
            for (int m = 0; m < 4; m++) begin
              in_valid = 1'b1;
              scale_en = sc;
              x_re = DATA_W'(dr[g + j + m * Lq]);
              x_im = DATA_W'(di[g + j + m * Lq]);
              c_re = DATA_W'(cr[m]);
              c_im = DATA_W'(ci[m]);
              @(negedge clk);
            end
          end
      in_valid = 1'b0;
      repeat (LAT + 2) @(negedge clk);
      check(q_re.size() == 0, $sformatf("stage %0d complete", s));
      for (int i = 0; i < N; i++) begin
        dr[i] = nr[i];
        di[i] = ni[i];
      end
    end

    // compare with a double-precision DFT
    err2 = 0.0;
    sig2 = 0.0;
    for (int k = 0; k < N; k++) begin
      real xr, xi, gain, er, ei;
      xr = 0.0;
      xi = 0.0;
      for (int n = 0; n < N; n++) begin
        real a;
        a  = -2.0 * PI * real'((longint'(k) * n) % N) / N;
        xr += in_r[n] * $cos(a) - in_i[n] * $sin(a);
        xi += in_r[n] * $sin(a) + in_i[n] * $cos(a);
      end
      gain = (TW / 65536.0) ** 4 * 1024.0;   // 65535^4 / 2^54
      er = real'(dr[k]) - gain * xr;
      ei = real'(di[k]) - gain * xi;
      err2 += er * er + ei * ei;
      sig2 += gain * gain * (xr * xr + xi * xi);
    end
    snr_db = 10.0 * $log10(sig2 / err2);
    $display("FFT: signal-to-error %0.1f dB, RNS overflows %0d, clipped outputs before the last stage %0d", snr_db, wraps, clips);
    check(snr_db > 60.0, "spectrum matches the floating-point DFT");
    check(clips == 0, "no intermediate result clipped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
