// tb_bf_filter_row: self-checking test of one filter stage. It drives
// random and hand-picked taps, centre values and valid masks into both
// kinds of stage (outer row, weights 1,2,1; centre row, weights 2,4,2) and
// compares the weight sum and weighted intensity sum with values computed
// from the kernel formulas in bf_ref_pkg.
module tb_bf_filter_row;
  import bf_ref_pkg::*;

  logic [2:0][7:0] taps;
  logic [7:0]      centre;
  logic [2:0]      valid;
  logic [7:0]      den_o, den_m;
  logic [15:0]     num_o, num_m;
  int checks = 0, failures = 0;

  bf_filter_row #(.DATA_W(8), .WS_SIDE(1), .WS_MID(2)) dut_outer (
    .taps, .centre, .valid, .den(den_o), .num(num_o));
  bf_filter_row #(.DATA_W(8), .WS_SIDE(2), .WS_MID(4)) dut_mid (
    .taps, .centre, .valid, .den(den_m), .num(num_m));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    int eno, eni, edo, edi, d, wr;
    eno = 0; eni = 0; edo = 0; edi = 0;
    #1;
    for (int i = 0; i < 3; i++) begin
      if (!valid[i]) continue;
      d  = int'(taps[i]) - int'(centre);
      if (d < 0) d = -d;
      wr = ref_range_weight(d, 8);
      edo += ref_spatial_weight(1, i - 1) * wr;
      eno += ref_spatial_weight(1, i - 1) * wr * taps[i];
      edi += ref_spatial_weight(0, i - 1) * wr;
      eni += ref_spatial_weight(0, i - 1) * wr * taps[i];
    end
    checks += 4;
    if (den_o != edo || num_o != eno || den_m != edi || num_m != eni) begin
      failures++;
      $display("FAIL: taps=%p centre=%0d valid=%b outer %0d/%0d exp %0d/%0d mid %0d/%0d exp %0d/%0d",
               taps, centre, valid, num_o, den_o, eno, edo, num_m, den_m, eni, edi);
    end
  endtask

  initial begin
    // Hand-picked: flat, every range bin, and the extremes.
    taps = {8'd100, 8'd100, 8'd100}; centre = 8'd100; valid = 3'b111; run_one();
    for (int k = 0; k < 8; k++) begin
      taps = {8'(k * 32), 8'(k * 32 + 31), 8'(k * 32 + 16)}; centre = 8'd0; valid = 3'b111; run_one();
    end
    taps = {8'd255, 8'd0, 8'd255}; centre = 8'd255; valid = 3'b101; run_one();
    repeat (5000) begin
      taps   = {8'($urandom), 8'($urandom), 8'($urandom)};
      centre = 8'($urandom);
      valid  = 3'($urandom);
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
