// tb_instruction_decoder: sends instruction sequences as the processor would
// and checks what the decoder produces: direct writes inside the SPM window
// (one write pulse with the data and address), direct writes outside it
// (handed to the handler as REQ_REDIRECT with the address), task requests
// with and without a data word, dropped unknown requests, and fsl_m_full
// while the handler is busy.
module tb_instruction_decoder;
  import spm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, fsl_m_write, fsl_m_full, handler_busy, write_spm_active, active_spm_handler;
  logic [31:0] fsl_m_data, address_to_spm, data_to_spm, data_to_spm_handler;
  logic [3:0]  id_task;
  req_e        request;
  int n_write, n_active;

  instruction_decoder dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (write_spm_active) n_write++;
    if (active_spm_handler) n_active++;
  end

  task automatic send(logic [31:0] w);
    @(negedge clk);
    while (fsl_m_full) @(negedge clk);
    fsl_m_data = w; fsl_m_write = 1;
    @(negedge clk);
    fsl_m_write = 0; fsl_m_data = 32'hDEAD_BEEF;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, ad; logic [3:0] t; int w0, a0;
    rst = 1; fsl_m_write = 0; fsl_m_data = 0; handler_busy = 0; n_write = 0; n_active = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // the paper's direct write: instruction, data, address
    send(32'h0FFF_FFFF); send(32'hFFFF_EEEE);
    @(negedge clk); fsl_m_data = 32'h8A23_1004; fsl_m_write = 1;
    @(posedge clk); #1; fsl_m_write = 0;
    check(write_spm_active && address_to_spm == 32'h8A23_1004 && data_to_spm == 32'hFFFF_EEEE, "direct write pulse");
    @(posedge clk); #1;
    check(!write_spm_active, "pulse lasts one cycle");
    for (int n = 0; n < 100; n++) begin
      d = $urandom; t = 4'($urandom);
      ad = (n % 3 == 0) ? 32'h9000_0000 + 4*n : 32'h8A22_0000 + 4*$urandom_range(32767);
      w0 = n_write; a0 = n_active;
      send({CMD_DIRECT_WRITE, 30'($urandom)}); send(d); send(ad);
      @(negedge clk);
      if (n % 3 == 0) begin
        check(n_write == w0 && n_active == a0 + 1, "outside SPM goes to the handler");
        check(request == REQ_REDIRECT && data_to_spm_handler == ad, "redirect carries the address");
      end else begin
        check(n_write == w0 + 1 && n_active == a0, "inside SPM is written");
        check(address_to_spm == ad && data_to_spm == d, "direct write address and data");
      end
      // task requests
      a0 = n_active;
      send(make_instr(CMD_TASK_ACCESS, t, REQ_HEAP_LOAD));
      @(negedge clk);
      check(n_active == a0 + 1 && id_task == t && request == REQ_HEAP_LOAD, "heap load request");
      send(make_instr(CMD_TASK_ACCESS, t, REQ_STACK_PUSH));
      @(negedge clk);
      check(n_active == a0 + 1, "push waits for its data word");
      send(d);
      @(negedge clk);
      check(n_active == a0 + 2 && request == REQ_STACK_PUSH && data_to_spm_handler == d, "push request with data");
      send(make_instr(CMD_TASK_ACCESS, t, req_e'(3'b110)));
      send(make_instr(CMD_TASK_ACCESS, t, REQ_STACK_PULL));
      @(negedge clk);
      check(n_active == a0 + 3 && request == REQ_STACK_PULL, "unknown request dropped, pull taken");
    end
    // back-pressure: handler busy holds fsl_m_full
    handler_busy = 1;
    @(negedge clk);
    check(fsl_m_full, "full while the handler is busy");
    fsl_m_write = 1; fsl_m_data = make_instr(CMD_TASK_ACCESS, 4'd2, REQ_HEAP_LOAD);
    a0 = n_active;
    repeat (5) @(negedge clk);
    check(n_active == a0, "no word taken while full");
    handler_busy = 0;
    @(negedge clk); fsl_m_write = 0;
    @(negedge clk);
    check(n_active == a0 + 1, "word taken once full drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
