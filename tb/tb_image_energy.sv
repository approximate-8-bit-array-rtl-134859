// tb_image_energy: image-energy workload. The energy of an r x c gray-scale
// image is RMS = sqrt(sum x(i,j)^2) / n with n = r * c, and the average over
// m images is ARMS = (1/m) * sum RMS_k. Every pixel is squared by the exact
// squarer and by all 35 approximate configurations, and the ARMS each gives
// must stay within +-0.05 of the exact ARMS.
//
// The images are synthetic, 256 x 256 pixels of 8 bits: smooth gradients with
// pseudo-random texture from $urandom, one image per seed. M_IMAGES sets how
// many are used.
module tb_image_energy;
  import aas_pkg::*;

  localparam int M_IMAGES = 4;
  localparam int R = 256;
  localparam int C = 256;
  localparam real THRESHOLD = 0.05;

  logic [7:0] x;
  logic [15:0] p_exact;
  logic [15:0] p [1:5][1:7];
  int checks = 0, failures = 0;

  aas_squarer8 #(.AMA(FA_AMA1), .LEVEL(0)) u_exact (.x(x), .p(p_exact));

  for (genvar t = 1; t <= 5; t++) begin : g_ama
    for (genvar l = 1; l <= 7; l++) begin : g_lvl
      aas_squarer8 #(.AMA(fa_kind_e'(t)), .LEVEL(l)) u_dut (.x(x), .p(p[t][l]));
    end
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real    arms_exact, arms_ref;
    real    arms [1:5][1:7];
    longint acc_ref, acc_exact;
    longint acc [1:5][1:7];
    int     dummy;
    arms_exact = 0.0;
    arms_ref = 0.0;
    for (int t = 1; t <= 5; t++)
      for (int l = 1; l <= 7; l++) arms[t][l] = 0.0;

    for (int img = 0; img < M_IMAGES; img++) begin
      dummy = $urandom(1000 + img);
      acc_ref = 0;
      acc_exact = 0;
      for (int t = 1; t <= 5; t++)
        for (int l = 1; l <= 7; l++) acc[t][l] = 0;
      for (int i = 0; i < R; i++) begin
        for (int j = 0; j < C; j++) begin
          int pix;
          pix = 3 * (i * (img + 1) + j * (M_IMAGES - img)) / (4 * (M_IMAGES + 1))
                + int'($urandom % 64) - 32;
          if (pix < 0) pix = 0;
          if (pix > 255) pix = 255;
          x = 8'(pix);
          #1;
          acc_ref += longint'(pix * pix);
          acc_exact += longint'(p_exact);
          for (int t = 1; t <= 5; t++)
            for (int l = 1; l <= 7; l++) acc[t][l] += longint'(p[t][l]);
        end
      end
      checks++;
      if (acc_exact != acc_ref) begin
        failures++;
        $display("FAIL image %0d: exact energy sum %0d, expected %0d", img, acc_exact, acc_ref);
      end
      arms_ref += $sqrt(real'(acc_ref)) / real'(R * C) / real'(M_IMAGES);
      arms_exact += $sqrt(real'(acc_exact)) / real'(R * C) / real'(M_IMAGES);
      for (int t = 1; t <= 5; t++)
        for (int l = 1; l <= 7; l++)
          arms[t][l] += $sqrt(real'(acc[t][l])) / real'(R * C) / real'(M_IMAGES);
    end

    $display("exact ARMS %f over %0d images", arms_exact, M_IMAGES);
    for (int t = 1; t <= 5; t++) begin
      for (int l = 1; l <= 7; l++) begin
        checks++;
        if (arms[t][l] > arms_exact + THRESHOLD || arms[t][l] < arms_exact - THRESHOLD) begin
          failures++;
          $display("FAIL AMA%0d V%0d ARMS %f outside %f +- %f", t, l, arms[t][l],
                   arms_exact, THRESHOLD);
        end
      end
      $display("AMA%0d ARMS V1..V7: %f %f %f %f %f %f %f", t, arms[t][1], arms[t][2],
               arms[t][3], arms[t][4], arms[t][5], arms[t][6], arms[t][7]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
