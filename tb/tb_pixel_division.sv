// tb_pixel_division: pixel division on two generated 8-bit grayscale scenes.
//
// Each output pixel is (first image * 64) / second image on the 16-by-8
// dividers, clipped to 255. Scene 1 is change detection: the second image
// equals the first except in a square where the scene changed, so the output
// is flat (64) outside the change. Scene 2 is background removal: the first
// image is objects under a smooth illumination ramp, the second the ramp
// alone. Depths 1..8 use the AXHD and 9..16 the E-AXHD. For every depth the
// testbench prints the PSNR of the approximate output image against the
// exact one (255 peak) and checks every pixel against the reference model.
// Depth 1 must reproduce the exact image, and depths 9..16 must give the
// same image as depth 8. Images are 64 by 64 pixels with
// values in 1..255 (no zero divisors).
module tb_pixel_division;
  import axhd_ref_pkg::*;

  localparam int SZ = 64;
  localparam int ND = 16;
  logic [15:0] x;
  logic [7:0]  y;
  logic [15:0] q [ND];
  int checks = 0, failures = 0;

  for (genvar d = 0; d < ND; d++) begin : g_dut
    if (d < 8) begin : g_axhd
      axhd  #(.N(16), .M(8), .H(d + 1)) dut (.x(x), .y(y), .q(q[d]));
    end else begin : g_eaxhd
      eaxhd #(.N(16), .M(8), .H(d + 1)) dut (.x(x), .y(y), .q(q[d]));
    end
  end

  function automatic int clip(longint unsigned v);
    return (v > 255) ? 255 : int'(v);
  endfunction

  function automatic int pix(int scene, int img, int i, int j);
    int base, illum, v;
    if (scene == 0) begin
      base = 60 + ((i * 3 + j * 2) % 120) + ((i ^ j) & 15);
      if (img == 1 && i >= 20 && i < 40 && j >= 24 && j < 44) v = base / 2 + 15;
      else v = base;
    end else begin
      illum = 120 + i + j / 2;                                   // 120..215
      if (img == 1) v = illum;
      else v = (((i / 8 + j / 8) % 2) == 1 ? 200 : 90) * illum / 255 + (j & 3);
    end
    return (v < 1) ? 1 : (v > 255 ? 255 : v);
  endfunction

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int scene = 0; scene < 2; scene++) begin
      real sse [ND];
      for (int d = 0; d < ND; d++) sse[d] = 0.0;
      for (int i = 0; i < SZ; i++)
        for (int j = 0; j < SZ; j++) begin
          int a, b, exact;
          a = pix(scene, 0, i, j);
          b = pix(scene, 1, i, j);
          x = 16'(a * 64);
          y = 8'(b);
          #1;
          exact = clip(longint'(a * 64 / b));
          for (int d = 0; d < ND; d++) begin
            longint unsigned e;
            int diff;
            e = ref_axhd(a * 64, b, 16, d + 1);
            checks++;
            if (q[d] !== 16'(e)) begin
              failures++;
              if (failures < 10) $display("FAIL h=%0d %0d/%0d -> %0d expected %0d", d + 1, a * 64, b, q[d], e);
            end
            diff = clip(q[d]) - exact;
            sse[d] += real'(diff * diff);
          end
        end
      for (int d = 0; d < ND; d++) begin
        automatic real mse = sse[d] / real'(SZ * SZ);
        if (mse == 0.0)
          $display("%s h=%2d (%s) PSNR = Inf", scene == 0 ? "change detection  " : "background removal",
                   d + 1, d < 8 ? "AXHD  " : "E-AXHD");
        else
          $display("%s h=%2d (%s) PSNR = %6.2f dB", scene == 0 ? "change detection  " : "background removal",
                   d + 1, d < 8 ? "AXHD  " : "E-AXHD", 10.0 * $log10(255.0 * 255.0 / mse));
      end
      // When every quotient is below 2^h, the exact part only hands its
      // dividend on as the remainder and the result is that of a plain
      // logarithmic divider; for these scenes that holds from depth 8 on.
      for (int d = 8; d < ND; d++) begin
        checks++;
        if (sse[d] != sse[7]) begin
          failures++;
          $display("FAIL output at h=%0d differs from h=8", d + 1);
        end
      end
      checks++;
      if (sse[0] != 0.0) begin
        failures++;
        $display("FAIL depth 1 output differs from the exact image");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
