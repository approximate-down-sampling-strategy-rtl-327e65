// tb_mac_array: random K x K x T_M windows and filters (including ifmap
// values with the top bit set, which must be treated as unsigned) against a
// 64-bit reference sum of products rescaled by FRAC_W bits. Also checks the
// one-cycle latency and that the result register holds while en = 0.
module tb_mac_array;
  import accel_pkg::*;
  import tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic en, in_valid, sum_valid;
  pix_t win [K][K][T_M];
  wgt_t wgt [T_M][K][K];
  logic signed [DATA_W-1:0] sum;

  mac_array dut (.*);

  function automatic logic signed [DATA_W-1:0] ref_sum();
    longint s = 0;
    foreach (win[y, x, m]) s += longint'({32'b0, win[y][x][m]}) * longint'(wgt[m][y][x]);
    return DATA_W'(s >>> FRAC_W);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [DATA_W-1:0] exp_v;
    en = 1'b1; in_valid = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2000) begin
      @(negedge clk);
      foreach (win[y, x, m])
        win[y][x][m] = ($urandom_range(0, 9) == 0) ? pix_t'($urandom()) : rand_pix();
      foreach (wgt[m, y, x])
        wgt[m][y][x] = ($urandom_range(0, 9) == 0) ? wgt_t'(int'($urandom_range(0, 2097152)) - 1048576)
                                                   : rand_wgt();
      exp_v = ref_sum();
      in_valid = 1'b1;
      en = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!sum_valid || sum !== exp_v) begin
        failures++;
        $display("FAIL sum=%h exp=%h valid=%b", sum, exp_v, sum_valid);
      end
      // hold while disabled, even with new inputs
      en = 1'b0;
      in_valid = 1'b1;
      foreach (wgt[m, y, x]) wgt[m][y][x] = rand_wgt();
      @(negedge clk);
      checks++;
      if (!sum_valid || sum !== exp_v) begin
        failures++;
        $display("FAIL hold sum=%h exp=%h", sum, exp_v);
      end
      in_valid = 1'b0;
      en = 1'b1;
      @(negedge clk);
      checks++;
      if (sum_valid) begin
        failures++;
        $display("FAIL valid without input");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
