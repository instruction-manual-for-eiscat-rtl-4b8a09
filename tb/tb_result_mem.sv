// Self-checking testbench for result_mem: random writes and reads over the
// full 4096-word depth against an associative-array model, including a read
// of the word being written (old value expected).
module tb_result_mem;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [11:0] raddr, waddr;
  logic [31:0] rdata, wdata;
  logic we;

  result_mem #(.DEPTH(4096), .DW(32)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [int];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1));
      waddr = 12'($urandom_range(0, 4095));
      if ($urandom_range(0, 3) == 0) waddr = 12'($urandom_range(0, 7));
      wdata = $urandom;
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 12'($urandom_range(0, 7));
      #1;
      if (model.exists(int'(raddr))) begin
        checks++;
        if (rdata !== model[int'(raddr)]) begin
          failures++;
          $display("FAIL read %0d: got %h expected %h", raddr, rdata, model[int'(raddr)]);
        end
      end
      @(posedge clk);
      if (we) model[int'(waddr)] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
