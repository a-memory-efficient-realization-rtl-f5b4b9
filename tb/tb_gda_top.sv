// tb_gda_top -- end-to-end test of the whole design at its default sizes.
// Both units run at once:
//   - the seven-point DCT takes random 12-bit blocks, first as an unbroken
//     stream, then with random gaps, and every Y(k) is compared with the
//     floating-point DCT within TOL; the stream must yield one block every
//     32 cycles;
//   - the four-point cyclic convolution takes random 16-bit vectors and
//     every u_i is compared exactly with the circulant product.
// It also counts how often each mechanism of the design occurred and
// counts a failure for any that never did: the preprocessing stage holding
// a block while the GDAU is busy, a block starting in the GDAU's last
// cycle (back to back), gaps in the sample stream, each GDAU group address
// and rotating factor, and each cyclic convolution group and rotation.
module tb_gda_top;
  localparam int IW = 12, OW = 16;
  localparam int NBLK = 60;
  localparam int NVEC = 150;
  localparam int TOL  = 4;
  logic clk = 0, rst_n = 0;
  logic dct_in_valid = 0, dct_in_ready, dct_out_valid;
  logic signed [IW-1:0] dct_in_data = '0;
  logic [2:0] dct_out_index;
  logic signed [OW-1:0] dct_out_data;
  logic cc_in_valid = 0, cc_in_ready, cc_out_valid;
  logic signed [15:0] cc_in_v [4];
  logic signed [33:0] cc_out_u [4];
  int checks = 0, failures = 0;
  int cyc = 0;

  gda_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_hold = 0, n_b2b = 0, n_gap = 0;
  int n_grp [4] = '{0, 0, 0, 0};
  int n_rot [3] = '{0, 0, 0};
  int n_cgrp [6] = '{0, 0, 0, 0, 0, 0};
  int n_crot [4] = '{0, 0, 0, 0};

  always @(posedge clk) if (rst_n) begin
    if (dut.u_dct.x_valid && !dut.u_dct.g_ready) n_hold++;
    if (dut.u_dct.u_gdau.last_odd && dut.u_dct.x_valid) n_b2b++;
    if (dct_in_ready && !dct_in_valid && dut.u_dct.u_pre.cnt != 0) n_gap++;
    if (dut.u_dct.u_gdau.busy) begin
      n_grp[dut.u_dct.u_gdau.grp]++;
      if (dut.u_dct.u_gdau.rot < 3) n_rot[dut.u_dct.u_gdau.rot]++;
    end
    if (dut.u_cconv.busy) begin
      if (dut.u_cconv.grp < 6) n_cgrp[dut.u_cconv.grp]++;
      n_crot[dut.u_cconv.rot]++;
    end
  end

  // ---------------- DCT ----------------
  real ref_y [NBLK][7];
  int  nout = 0, prev_start = 0, maxerr = 0;

  always @(posedge clk) if (rst_n && dct_out_valid) begin
    int b, k, err;
    b = nout / 7;
    k = nout % 7;
    checks++;
    if (int'(dct_out_index) != k) begin
      failures++;
      $display("DCT block %0d: index %0d, expected %0d", b, dct_out_index, k);
    end
    err = int'(dct_out_data) - $rtoi(ref_y[b][k] + (ref_y[b][k] >= 0.0 ? 0.5 : -0.5));
    if (err < 0) err = -err;
    if (err > maxerr) maxerr = err;
    checks++;
    if (err > TOL) begin
      failures++;
      $display("DCT block %0d Y(%0d): got %0d want %f", b, k, dct_out_data, ref_y[b][k]);
    end
    if (k == 0) begin
      if (b > 0 && b < NBLK / 2) begin
        checks++;
        if (cyc - prev_start != 32) begin
          failures++;
          $display("DCT block %0d follows after %0d cycles", b, cyc - prev_start);
        end
      end
      prev_start = cyc;
    end
    nout <= nout + 1;
  end

  task automatic drive_dct();
    int y [7];
    for (int b = 0; b < NBLK; b++) begin
      for (int n = 0; n < 7; n++) y[n] = $signed(IW'($urandom));
      if (b == 1) for (int n = 0; n < 7; n++) y[n] = (n % 2) ? -2048 : 2047;
      if (b == 2) for (int n = 0; n < 7; n++) y[n] = 2047;
      for (int k = 0; k < 7; k++) begin
        ref_y[b][k] = 0.0;
        for (int n = 0; n < 7; n++)
          ref_y[b][k] += real'(y[n]) * $cos(3.14159265358979 * real'((2 * n + 1) * k) / 14.0);
      end
      for (int n = 0; n < 7; n++) begin
        if (b >= NBLK / 2) while ($urandom_range(0, 3) == 0) begin
          dct_in_valid = 0;
          @(negedge clk);
        end
        dct_in_valid = 1;
        dct_in_data = IW'(y[n]);
        @(posedge clk);
        while (!dct_in_ready) @(posedge clk);
        @(negedge clk);
      end
      dct_in_valid = 0;
    end
  endtask

  // ---------------- cyclic convolution ----------------
  localparam longint CC [4] = '{11585, -6270, 15137, 3196};
  int nvec_done = 0;

  task automatic drive_cc();
    longint e;
    for (int b = 0; b < NVEC; b++) begin
      for (int m = 0; m < 4; m++) cc_in_v[m] = 16'($urandom);
      cc_in_valid = 1;
      @(posedge clk);
      while (!cc_in_ready) @(posedge clk);
      @(negedge clk);
      cc_in_valid = 0;
      while (!cc_out_valid) @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        e = 0;
        for (int m = 0; m < 4; m++) e += longint'(cc_in_v[(i + m) % 4]) * CC[m];
        checks++;
        if (longint'(cc_out_u[i]) != e) begin
          failures++;
          $display("CC vector %0d u%0d: got %0d want %0d", b, i + 1, cc_out_u[i], e);
        end
      end
      nvec_done++;
    end
  endtask

  initial begin
    for (int m = 0; m < 4; m++) cc_in_v[m] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      drive_dct();
      drive_cc();
    join
    while (nout < 7 * NBLK) @(negedge clk);
    repeat (5) @(negedge clk);
    checks += 2;
    if (nout != 7 * NBLK) failures++;
    if (nvec_done != NVEC) failures++;
    $display("DCT blocks %0d, largest error %0d; cyclic convolutions %0d", nout / 7, maxerr, nvec_done);
    $display("mechanisms: preprocessing hold %0d, back-to-back GDAU start %0d, input gaps %0d",
             n_hold, n_b2b, n_gap);
    $display("GDAU groups %0d %0d %0d %0d, rotations %0d %0d %0d",
             n_grp[0], n_grp[1], n_grp[2], n_grp[3], n_rot[0], n_rot[1], n_rot[2]);
    $display("CC groups %0d %0d %0d %0d %0d %0d, rotations %0d %0d %0d %0d",
             n_cgrp[0], n_cgrp[1], n_cgrp[2], n_cgrp[3], n_cgrp[4], n_cgrp[5],
             n_crot[0], n_crot[1], n_crot[2], n_crot[3]);
    checks += 3;
    if (n_hold == 0) failures++;
    if (n_b2b == 0) failures++;
    if (n_gap == 0) failures++;
    for (int g = 0; g < 4; g++) begin checks++; if (n_grp[g] == 0) failures++; end
    for (int r = 0; r < 3; r++) begin checks++; if (n_rot[r] == 0) failures++; end
    for (int g = 0; g < 6; g++) begin checks++; if (n_cgrp[g] == 0) failures++; end
    for (int r = 0; r < 4; r++) begin checks++; if (n_crot[r] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
