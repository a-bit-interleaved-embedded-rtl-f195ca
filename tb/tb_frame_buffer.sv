// tb_frame_buffer: writes random words, reads them back through the registered
// read port and compares with a reference array; also checks that rdata holds
// while re is low and that a same-cycle read returns the old word.
module tb_frame_buffer;
  localparam int DEPTH = 81;
  logic clk = 0, we = 0, re = 0;
  logic [6:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  frame_buffer dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic [31:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, rdata, exp);
    end
  endtask

  initial begin
    logic [31:0] held;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 7'(i); wdata = $urandom; ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      @(negedge clk); re = 1; raddr = 7'(a);
      // random write elsewhere in the same cycle
      if ($urandom_range(1)) begin
        int w;
        w = $urandom_range(DEPTH - 1);
        we = 1; waddr = 7'(w); wdata = $urandom;
      end else we = 0;
      @(posedge clk); #1;
      chk(ref_mem[a], "read");
      if (we) ref_mem[waddr] = wdata;
    end
    @(negedge clk); re = 0; we = 0;
    held = rdata;
    repeat (3) @(negedge clk);
    chk(held, "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
