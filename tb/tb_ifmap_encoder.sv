// tb_ifmap_encoder: checks the ifmap coder against the sub-range search of
// the coding algorithm, for the default configuration (D = 64 levels over
// 256.0 in Q16.16) and for the worked example's configuration (R = 255 ~ 2^8,
// D = 4, sub-range 64), including the example's boundary values.
module tb_ifmap_encoder;
  import accel_pkg::*;
  import tb_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  pix_t act;
  logic [6:0] code64;
  logic [2:0] code4;

  ifmap_encoder dut64 (.act(act), .code(code64));
  ifmap_encoder #(.D_FMAPS(4), .FMAP_RANGE_LOG2(8)) dut4 (.act(act), .code(code4));

  task automatic check(pix_t a);
    int e64, e4;
    act = a;
    #1;
    e64 = ref_fcode(a, 64'(1) << 24, 64);
    e4  = ref_fcode(a, 64'(256), 4);
    checks += 2;
    if (int'(code64) != e64) begin
      failures++;
      $display("FAIL D=64 act=%h code=%0d exp=%0d", a, code64, e64);
    end
    if (int'(code4) != e4) begin
      failures++;
      $display("FAIL D=4 act=%h code=%0d exp=%0d", a, code4, e4);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // boundaries of the worked example (sub-range 64)
    check(0); check(1); check(63); check(64); check(127); check(128);
    check(191); check(192); check(255); check(256); check(32'hFFFF_FFFF);
    // boundaries of the default range
    check(32'h0003_FFFF); check(32'h0004_0000); check(32'h00FF_FFFF); check(32'h0100_0000);
    repeat (5000) begin
      check(rand_pix());
      check(pix_t'($urandom_range(0, 600)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
