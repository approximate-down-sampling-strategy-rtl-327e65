// tb_filter_buffer: loads a sequence of random filter slices (original and
// coded coefficients together) with random gaps on the load side and random
// delays before each take. The current slice must change only on take and
// must then equal the next slice of the sequence; the load port must refuse
// a beat while the next entry is full, and at least one such refusal must
// occur.
module tb_filter_buffer;
  import accel_pkg::*;
  import tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ld_valid, ld_ready, take, next_full;
  wgt_t ld_wgt [T_M][K][K], cur_wgt [T_M][K][K];
  wcode_t ld_code [T_M][K][K], cur_code [T_M][K][K];

  filter_buffer dut (.*);

  localparam int NSLICE = 60;
  wgt_t   sw [NSLICE][T_M][K][K];
  wcode_t sc [NSLICE][T_M][K][K];
  int nrefused = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // loader
  initial begin
    ld_valid = 1'b0;
    foreach (sw[i, m, y, x]) begin
      sw[i][m][y][x] = rand_wgt();
      sc[i][m][y][x] = ref_wcode(int'(sw[i][m][y][x]));
    end
    @(posedge rst_n);
    for (int i = 0; i < NSLICE; i++) begin
      @(negedge clk);
      while ($urandom_range(0, 2) == 0) @(negedge clk);
      ld_valid = 1'b1;
      ld_wgt = sw[i];
      ld_code = sc[i];
      @(posedge clk);
      while (!ld_ready) begin
        nrefused++;
        @(posedge clk);
      end
      @(negedge clk);
      ld_valid = 1'b0;
    end
  end

  // consumer
  initial begin
    take = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NSLICE; i++) begin
      while (!next_full) @(negedge clk);
      repeat ($urandom_range(0, 4)) @(negedge clk);
      take = 1'b1;
      @(negedge clk);
      take = 1'b0;
      checks++;
      if (cur_wgt != sw[i] || cur_code != sc[i]) begin
        failures++;
        $display("FAIL slice %0d", i);
      end
      // hold while no take
      @(negedge clk);
      checks++;
      if (cur_wgt != sw[i] || cur_code != sc[i]) begin
        failures++;
        $display("FAIL hold slice %0d", i);
      end
    end
    checks++;
    if (nrefused == 0) begin failures++; $display("FAIL no refused beat"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
