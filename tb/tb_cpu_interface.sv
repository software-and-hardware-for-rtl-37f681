// tb_cpu_interface: response words are held on the FSL slave side with
// exists, control and interrupt until the processor reads them; busy blocks
// a second word. Random words, random read delays.
module tb_cpu_interface;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst, ctrl_in, ready, busy, fsl_s_control, fsl_s_exists, fsl_s_read, interrupt;
  logic [31:0] data_in, fsl_s_data;

  cpu_interface dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w; logic c; int d;
    rst = 1; ready = 0; data_in = 0; ctrl_in = 0; fsl_s_read = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!fsl_s_exists && !interrupt && !busy, "idle after reset");
    for (int n = 0; n < 200; n++) begin
      w = $urandom; c = 1'($urandom);
      data_in = w; ctrl_in = c; ready = 1;
      @(negedge clk); ready = 0; data_in = ~w;
      d = $urandom_range(5);
      for (int k = 0; k <= d; k++) begin
        check(fsl_s_exists && interrupt && busy, "word held");
        check(fsl_s_data == w && fsl_s_control == c, "data and control held");
        if (k < d) @(negedge clk);
      end
      fsl_s_read = 1;
      @(negedge clk); fsl_s_read = 0;
      check(!fsl_s_exists && !interrupt && !busy, "cleared by read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
