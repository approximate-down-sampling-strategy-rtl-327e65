// tb_bank1: checks Bank 1 (one accumulation word per pooled output) at its default size: random writes and reads to
// random addresses against an associative-array model, read data one cycle
// after re, read data held while re = 0, a read and a write in the same
// cycle, and the first and last address.
module tb_bank1;
  import accel_pkg::*;

  localparam int unsigned WORD_W = DATA_W;
  localparam int unsigned DEPTH = 112 * 112;
  localparam int unsigned AW = $clog2(DEPTH);

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic re, we;
  logic [AW-1:0] raddr, waddr;
  logic [WORD_W-1:0] rdata, wdata;

  bank1 dut (.*);

  logic [WORD_W-1:0] model [int];

  function automatic logic [WORD_W-1:0] rnd();
    logic [WORD_W-1:0] v;
    for (int i = 0; i < WORD_W; i += 32) v[i +: 32] = $urandom();
    return v;
  endfunction

  task automatic write(int a, logic [WORD_W-1:0] d);
    @(negedge clk);
    we = 1'b1; waddr = AW'(a); wdata = d; re = 1'b0;
    @(negedge clk);
    we = 1'b0;
    model[a] = d;
  endtask

  task automatic read_check(int a);
    @(negedge clk);
    re = 1'b1; raddr = AW'(a);
    @(negedge clk);
    re = 1'b0;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("FAIL read addr=%0d got=%h exp=%h", a, rdata, model[a]);
    end
    // held while idle
    raddr = AW'($urandom_range(0, DEPTH - 1));
    @(negedge clk);
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("FAIL hold addr=%0d", a);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    re = 1'b0; we = 1'b0; raddr = '0; waddr = '0; wdata = '0;
    write(0, rnd());
    write(DEPTH - 1, rnd());
    read_check(0);
    read_check(DEPTH - 1);
    repeat (300) begin
      a = $urandom_range(0, DEPTH - 1);
      write(a, rnd());
      if ($urandom_range(0, 1) == 0) read_check(a);
    end
    // simultaneous read of one word and write of another
    write(5, rnd());
    @(negedge clk);
    re = 1'b1; raddr = 5; we = 1'b1; waddr = 6; wdata = rnd();
    model[6] = wdata;
    @(negedge clk);
    re = 1'b0; we = 1'b0;
    checks++;
    if (rdata !== model[5]) begin failures++; $display("FAIL rd/wr same cycle"); end
    read_check(6);
    foreach (model[k]) read_check(k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
