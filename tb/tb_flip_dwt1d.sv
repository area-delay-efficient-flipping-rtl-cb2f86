// tb_flip_dwt1d: the flipping 1-D DWT unit.
//  1. DW = 12, DEPTH = 1: random sequences of pairs, each started with
//     first = 1, some cycles with en = 0 in between. v_l/v_h must match the
//     integer reference bit for bit, one cycle after the pair (out_valid).
//  2. DW = 12, DEPTH = 4: four sequences interleaved over the slots must give
//     the same results as each sequence run alone.
//  3. DW = 24: accuracy against the real-valued 9/7 flipping equations (no
//     quantisation) on inputs with 6 fractional bits; a constant input must
//     give a high band near 0 and a low band near sqrt(2) times the input.
module tb_flip_dwt1d;
  import tb_ref_pkg::*;

  localparam int DW  = 12;
  localparam int DWB = 24;
  localparam int LEN = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // DUT A: single sequence.
  logic          en_a, first_a, ov_a;
  logic [DW-1:0] xe_a, xo_a, vl_a, vh_a;
  flip_dwt1d #(.DW(DW)) dut_a (
    .clk, .rst_n, .en(en_a), .first(first_a), .slot(1'b0),
    .x_2n(xe_a), .x_2n_1(xo_a), .out_valid(ov_a), .v_l(vl_a), .v_h(vh_a));

  // DUT B: four interleaved sequences.
  logic          en_b, first_b, ov_b;
  logic [1:0]    slot_b;
  logic [DW-1:0] xe_b, xo_b, vl_b, vh_b;
  flip_dwt1d #(.DW(DW), .DEPTH(4)) dut_b (
    .clk, .rst_n, .en(en_b), .first(first_b), .slot(slot_b),
    .x_2n(xe_b), .x_2n_1(xo_b), .out_valid(ov_b), .v_l(vl_b), .v_h(vh_b));

  // DUT C: wide word for accuracy.
  logic           en_c, first_c, ov_c;
  logic [DWB-1:0] xe_c, xo_c, vl_c, vh_c;
  flip_dwt1d #(.DW(DWB)) dut_c (
    .clk, .rst_n, .en(en_c), .first(first_c), .slot(1'b0),
    .x_2n(xe_c), .x_2n_1(xo_c), .out_valid(ov_c), .v_l(vl_c), .v_h(vh_c));

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input longint got, input longint exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    longint xa[], xb[], vl[], vh[];
    longint sa[4][], sb[4][], svl[4][], svh[4][];
    real    ra[], rb[];
    en_a = 0; first_a = 0; xe_a = '0; xo_a = '0;
    en_b = 0; first_b = 0; xe_b = '0; xo_b = '0; slot_b = '0;
    en_c = 0; first_c = 0; xe_c = '0; xo_c = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- 1: single sequences, bit exact, with idle cycles.
    for (int s = 0; s < 20; s++) begin
      xa = new[LEN];
      xb = new[LEN];
      foreach (xa[i]) begin
        // Small amplitudes keep the stages in range, larger ones wrap.
        int amp;
        amp = (s < 10) ? 24 : 2047;
        xa[i] = longint'($urandom_range(2 * amp)) - amp;
        xb[i] = longint'($urandom_range(2 * amp)) - amp;
      end
      ref_flip(xa, xb, DW, vl, vh);
      for (int i = 0; i < LEN; i++) begin
        if ($urandom_range(3) == 0) begin
          en_a <= 0;
          @(posedge clk);
          #1;
          cmp(longint'(ov_a), 0, "out_valid after idle");
        end
        en_a    <= 1;
        first_a <= (i == 0);
        xo_a    <= DW'(xa[i]);
        xe_a    <= DW'(xb[i]);
        @(posedge clk);
        en_a <= 0;
        #1;
        // Result of this pair is visible right after the edge that took it.
        cmp(longint'(ov_a), 1, "out_valid");
        cmp(sext(longint'(vl_a), DW), vl[i], "v_l");
        cmp(sext(longint'(vh_a), DW), vh[i], "v_h");
      end
    end

    // ---- 2: interleaved slots.
    for (int q = 0; q < 4; q++) begin
      sa[q] = new[LEN];
      sb[q] = new[LEN];
      foreach (sa[q][i]) begin
        sa[q][i] = longint'($urandom_range(64)) - 32;
        sb[q][i] = longint'($urandom_range(64)) - 32;
      end
      ref_flip(sa[q], sb[q], DW, svl[q], svh[q]);
    end
    for (int i = 0; i < LEN; i++) begin
      for (int q = 0; q < 4; q++) begin
        en_b    <= 1;
        first_b <= (i == 0);
        slot_b  <= 2'(q);
        xo_b    <= DW'(sa[q][i]);
        xe_b    <= DW'(sb[q][i]);
        @(posedge clk);
        en_b <= 0;
        #1;
        cmp(sext(longint'(vl_b), DW), svl[q][i], "slot v_l");
        cmp(sext(longint'(vh_b), DW), svh[q][i], "slot v_h");
      end
    end

    // ---- 3: accuracy against the real-valued equations.
    begin
      real s1, s2, s3, s4, r1, r2, r3, r4, evl, evh, maxe;
      real c1, c2, c3, c4, ch, cl;
      c1 = coef_real(0); c2 = coef_real(1); c3 = coef_real(2); c4 = coef_real(3);
      ch = coef_real(4); cl = coef_real(5);
      maxe = 0.0;
      for (int s = 0; s < 6; s++) begin
        s1 = 0; s2 = 0; s3 = 0; s4 = 0;
        for (int i = 0; i < LEN; i++) begin
          real a, b;
          longint ia, ib;
          // s = 0: constant input; otherwise random, 8-bit range, 6 fraction bits.
          ia = (s == 0) ? 100 * 64 : (longint'($urandom_range(255)) - 128) * 64;
          ib = (s == 0) ? 100 * 64 : (longint'($urandom_range(255)) - 128) * 64;
          a = real'(ia) / 64.0;
          b = real'(ib) / 64.0;
          r1 = b + s1 + c1 * a;
          r2 = r1 + s2 + c2 * s1;
          r3 = r2 + s3 + c3 * s2;
          r4 = r3 + s4 + c4 * s3;
          evl = cl * r4;
          evh = ch * s4;
          s1 = b; s2 = r1; s3 = r2; s4 = r3;
          en_c    <= 1;
          first_c <= (i == 0);
          xo_c    <= DWB'(ia);
          xe_c    <= DWB'(ib);
          @(posedge clk);
          en_c <= 0;
          #1;
          begin
            real gl, gh, e;
            gl = real'(sext(longint'(vl_c), DWB)) / 64.0;
            gh = real'(sext(longint'(vh_c), DWB)) / 64.0;
            e = (gl > evl) ? gl - evl : evl - gl;
            if (e > maxe) maxe = e;
            checks++;
            if (e > 0.5) begin
              failures++;
              if (failures < 10) $display("accuracy v_l: got %f expected %f", gl, evl);
            end
            e = (gh > evh) ? gh - evh : evh - gh;
            if (e > maxe) maxe = e;
            checks++;
            if (e > 0.5) begin
              failures++;
              if (failures < 10) $display("accuracy v_h: got %f expected %f", gh, evh);
            end
            if (s == 0 && i > 4) begin
              checks++;
              if (gl < 141.0 || gl > 142.0 || gh > 0.5 || gh < -0.5) begin
                failures++;
                $display("constant input: v_l %f v_h %f", gl, gh);
              end
            end
          end
        end
      end
      $display("largest deviation from real-valued equations: %f", maxe);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
