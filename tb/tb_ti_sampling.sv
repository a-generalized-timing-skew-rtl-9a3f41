// tb_ti_sampling: the evaluation workload of the platform - a 4-path
// time-interleaved system at 160 MS/s handling a 75 MHz sine.
//
// The platform runs at its defaults. For each generator the testbench takes
// the instants that decide sampling or play-out in the analog circuit:
//   A/D generator           : pre-phase falling edges (S/H sampling instants)
//   D/A / N-path generator  : post-phase rising edges (multiplexer play-out)
//                             and pre-phase falling edges (filter sampling)
//   switching generator     : phi_s falling edges (common switch opens)
// It records which path each instant belongs to and checks that the
// instants form a uniform 6250 ps grid across all four paths (zero timing
// skew) with the paths taking turns 1..4. An ideal sampler model then
// samples sin(2 pi 75 MHz t) at those instants; the 256-point DFT of the
// result must show the tone and no timing-mismatch images at 5, 35 and
// 45 MHz (fs/4 - fin, fs/2 - fin and 3fs/4 - fin folded), which a skewed
// 4-phase clock would put there. With 256 samples every tone falls on a DFT
// bin exactly (75 MHz = 120 fs/256). As a control, the same analysis is
// repeated on the A/D instants with path 1 moved by 13 ps, a mismatch of the
// size a conventional generator shows: its images must then be clearly
// visible (above -70 dBc), proving the measurement can see skew.
`timescale 1ps/1ps
module tb_ti_sampling;
  import clkgen_pkg::*;

  localparam int unsigned N       = NPHASE_DEFAULT;
  localparam int unsigned T       = TCLK_PS;
  localparam int unsigned M       = 256;
  localparam int unsigned SETTLE  = 12 * T;
  localparam real         FIN_HZ  = 75.0e6;
  localparam real         FS_HZ   = 160.0e6;
  localparam real         PI      = 3.14159265358979323846;
  localparam real         IMG_MAX_DB = -100.0;
  localparam int          NSTREAM = 4;

  logic         clk = 1'b0;
  logic [N-1:0] ad_phi, ad_phi_p, da_phi, da_phi_p, eds_phi;
  logic         eds_phi_s;

  always #(T/2) clk = ~clk;

  clkgen_platform dut (
    .clk(clk), .ad_phi(ad_phi), .ad_phi_p(ad_phi_p), .da_phi(da_phi),
    .da_phi_p(da_phi_p), .eds_phi(eds_phi), .eds_phi_s(eds_phi_s)
  );

  int checks = 0, failures = 0;

  task automatic expect_true(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR: %s", msg);
    end
  endtask

  // Sampling instants per stream: 0 A/D S/H, 1 D/A play-out, 2 N-path
  // filter sampling, 3 switching-scheme common switch.
  longint inst [NSTREAM][M];
  int     path [NSTREAM][M];
  int     cnt  [NSTREAM];
  logic [N-1:0] prev_ad_p, prev_da, prev_da_p;
  int     eds_path;

  initial for (int s = 0; s < NSTREAM; s++) cnt[s] = 0;

  task automatic record(int s, int p);
    if ($time >= SETTLE && cnt[s] < M) begin
      inst[s][cnt[s]] = $time;
      path[s][cnt[s]] = p;
      cnt[s]++;
    end
  endtask

  always begin
    @(ad_phi_p);
    for (int i = 0; i < N; i++) if (prev_ad_p[i] && !ad_phi_p[i]) record(0, i);
    prev_ad_p = ad_phi_p;
  end
  always begin
    @(da_phi);
    for (int i = 0; i < N; i++) if (!prev_da[i] && da_phi[i]) record(1, i);
    prev_da = da_phi;
  end
  always begin
    @(da_phi_p);
    for (int i = 0; i < N; i++) if (prev_da_p[i] && !da_phi_p[i]) record(2, i);
    prev_da_p = da_phi_p;
  end
  // For the switching scheme the path whose phase is high when phi_s falls
  // is the one being sampled.
  always @(negedge eds_phi_s) begin
    eds_path = -1;
    for (int i = 0; i < N; i++) if (eds_phi[i]) eds_path = i;
    record(3, eds_path);
  end

  // DFT magnitude at f_hz of the sine sampled at stream s's instants, with
  // an optional extra delay skew_ps on path skew_path; in dB relative to
  // ref_mag, or linear when ref_mag is 0.
  function automatic real mag_db(int s, real f_hz, real ref_mag, int skew_path = -1, int skew_ps = 0);
    real re = 0.0, im = 0.0, x, mag, t;
    for (int n = 0; n < M; n++) begin
      t  = real'(inst[s][n]) + ((path[s][n] == skew_path) ? real'(skew_ps) : 0.0);
      x  = $sin(2.0 * PI * FIN_HZ * t * 1.0e-12);
      re += x * $cos(2.0 * PI * f_hz * real'(n) / FS_HZ);
      im -= x * $sin(2.0 * PI * f_hz * real'(n) / FS_HZ);
    end
    mag = $sqrt(re * re + im * im);
    if (ref_mag <= 0.0) return mag;
    return 20.0 * $log10((mag + 1.0e-300) / ref_mag);
  endfunction

  task automatic analyse(int s, string name);
    longint max_dev = 0;
    real    sig, img, worst = -400.0;
    real    img_f [3] = '{5.0e6, 35.0e6, 45.0e6};
    expect_true(cnt[s] == M, $sformatf("%s: %0d instants recorded", name, cnt[s]));
    for (int n = 1; n < M; n++) begin
      longint dev = inst[s][n] - inst[s][n-1] - longint'(T);
      if (dev < 0) dev = -dev;
      if (dev > max_dev) max_dev = dev;
      expect_true(path[s][n] == (path[s][n-1] + 1) % N,
                  $sformatf("%s: path %0d follows path %0d", name, path[s][n] + 1, path[s][n-1] + 1));
    end
    expect_true(max_dev == 0, $sformatf("%s: sampling grid deviates by %0d ps", name, max_dev));
    sig = mag_db(s, FIN_HZ, 0.0);
    expect_true(sig > 0.45 * M, $sformatf("%s: tone magnitude %f too small", name, sig));
    for (int k = 0; k < 3; k++) begin
      img = mag_db(s, img_f[k], sig);
      expect_true(img < IMG_MAX_DB, $sformatf("%s: image at %0.0f MHz is %0.1f dBc", name, img_f[k] / 1.0e6, img));
      if (img > worst) worst = img;
    end
    $display("%s: %0d instants, max timing skew %0d ps, worst image %0.1f dBc",
             name, cnt[s], max_dev, worst);
  endtask

  task automatic control_with_skew();
    real sig, img, worst = -400.0;
    real img_f [3] = '{5.0e6, 35.0e6, 45.0e6};
    sig = mag_db(0, FIN_HZ, 0.0, 0, 13);
    for (int k = 0; k < 3; k++) begin
      img = mag_db(0, img_f[k], sig, 0, 13);
      if (img > worst) worst = img;
    end
    expect_true(worst > -70.0, $sformatf("control: 13 ps skew gave images of only %0.1f dBc", worst));
    $display("control, path 1 skewed by 13 ps: worst image %0.1f dBc", worst);
  endtask

  initial begin
    #(longint'(T) * (M + 200));
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(SETTLE) + longint'(T) * (M + 4));
    analyse(0, "A/D S/H sampling");
    analyse(1, "D/A multiplexer play-out");
    analyse(2, "N-path filter sampling");
    analyse(3, "switching-scheme common switch");
    control_with_skew();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
