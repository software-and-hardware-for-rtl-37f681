// tb_spm_ip: the SPM coprocessor with its SPM block RAM, driven over the
// Direct FSL link as the processor drives it. The SPM is initialised with
// direct writes (the first one is the paper's: instruction 0x0FFFFFFF,
// data 0xFFFFEEEE, address 0x8A231004), then the paper's task-1 sequence
// is run (heap load 0xCCCCDDDD, heap store 0xF2222222 answered 0xAAAAAAAA,
// stack push and pull), a full frame (answer 0xEEEEEEEE) and out-of-SPM
// requests (address sent back with the control bit low). Responses and the
// SPM contents (read through port A) are checked, as is the BRAM write
// strobe of a direct write.
module tb_spm_ip;
  import spm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, fsl_m_control, fsl_m_write, fsl_m_full, fsl_s_control, fsl_s_exists, fsl_s_read, interrupt;
  logic [31:0] fsl_m_data, fsl_s_data;
  logic [31:0] b_din, b_addr, b_dout;
  logic [3:0]  b_wen;
  logic        b_clk, b_en, b_rst;
  logic        a_en;
  logic [31:0] a_addr, a_rdata;

  spm_ip dut (
    .fsl_clk(clk), .fsl_rst(rst), .fsl_m_clk(clk), .fsl_m_data, .fsl_m_control, .fsl_m_write, .fsl_m_full,
    .fsl_s_clk(clk), .fsl_s_data, .fsl_s_control, .fsl_s_exists, .fsl_s_read, .interrupt,
    .xil_bram_din_b(b_din), .xil_bram_addr_b(b_addr), .xil_bram_dout_b(b_dout), .xil_bram_wen_b(b_wen),
    .xil_bram_clk_b(b_clk), .xil_bram_en_b(b_en), .xil_bram_rst_b(b_rst));
  spm_bram ram (
    .clk_a(clk), .en_a(a_en), .we_a(4'h0), .addr_a(a_addr), .wdata_a(32'h0), .rdata_a(a_rdata),
    .clk_b(b_clk), .en_b(b_en), .we_b(b_wen), .addr_b(b_addr), .wdata_b(b_dout), .rdata_b(b_din));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_full_seen;
  always @(posedge clk) if (fsl_m_write && fsl_m_full) n_full_seen++;

  task automatic send(logic [31:0] w);
    @(negedge clk);
    fsl_m_data = w; fsl_m_write = 1;
    @(posedge clk);
    while (fsl_m_full) @(posedge clk);
    @(negedge clk);
    fsl_m_write = 0;
  endtask

  task automatic recv(output logic [31:0] w, output logic c, input int delay = 0);
    int k = 0;
    while (!fsl_s_exists && k < 200) begin @(negedge clk); k++; end
    check(fsl_s_exists && interrupt, "a response arrives with the interrupt");
    repeat (delay) @(negedge clk);
    w = fsl_s_data; c = fsl_s_control;
    fsl_s_read = 1;
    @(negedge clk);
    fsl_s_read = 0;
  endtask

  task automatic direct_write(logic [31:0] a, logic [31:0] d);
    send(32'h0FFF_FFFF); send(d); send(a);
  endtask

  task automatic spm_peek(logic [31:0] a, output logic [31:0] d);
    @(negedge clk); a_en = 1; a_addr = a;
    @(negedge clk); a_en = 0; d = a_rdata;
  endtask

  task automatic task_op(logic [3:0] t, req_e r, logic [31:0] d, output logic [31:0] w, output logic c);
    send(make_instr(CMD_TASK_ACCESS, t, r));
    if (r == REQ_HEAP_STORE || r == REQ_STACK_PUSH) send(d);
    recv(w, c);
  endtask

  bit saw_strobe;
  always @(posedge clk) if (b_en && b_wen == 4'hF && b_addr == 32'h8A23_1004 && b_dout == 32'hFFFF_EEEE) saw_strobe = 1;

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w, d; logic c;
    rst = 1; fsl_m_control = 0; fsl_m_write = 0; fsl_m_data = 0; fsl_s_read = 0; a_en = 0; a_addr = 0;
    saw_strobe = 0; n_full_seen = 0;
    repeat (3) @(negedge clk);
    check(b_rst, "BRAM reset during reset");
    rst = 0;
    direct_write(32'h8A23_1004, 32'hFFFF_EEEE);
    repeat (2) @(negedge clk);
    check(saw_strobe, "direct write drives BRAM port B with all byte enables");
    spm_peek(32'h8A23_1004, d);
    check(d == 32'hFFFF_EEEE, "direct write stored");
    // profiler of task 1 as in the paper
    direct_write(32'h8A23_0004, 32'h8A23_1004);
    direct_write(32'h8A23_1004, 32'h8A22_000F);
    direct_write(32'h8A23_1008, 32'h8A22_005F);
    direct_write(32'h8A23_100C, 32'h9000_00FF);
    direct_write(32'h8A23_1010, 32'h9000_10EF);
    direct_write(32'h8A22_000F, 32'hCCCC_DDDD);
    task_op(1, REQ_HEAP_LOAD, 0, w, c);
    check(w == 32'hCCCC_DDDD && c, "heap load answers 0xCCCCDDDD");
    task_op(1, REQ_HEAP_STORE, 32'hF222_2222, w, c);
    check(w == RESP_DMA_NEEDED && c, "store answers 0xAAAAAAAA");
    spm_peek(32'h8A22_0013, d); check(d == 32'hF222_2222, "stored at 0x8A220013");
    spm_peek(32'h8A23_1004, d); check(d == 32'h8A22_0013, "HEAP_CURR_PTR_SPM = 0x8A220013");
    spm_peek(32'h8A23_100C, d); check(d == 32'h9000_0103, "HEAP_CURR_PTR_DRAM = 0x90000103");
    task_op(1, REQ_STACK_PUSH, 32'h0BAD_F00D, w, c);
    check(w == RESP_DMA_NEEDED, "push answers 0xAAAAAAAA");
    spm_peek(32'h8A23_1008, d); check(d == 32'h8A22_005B, "STAK_CURR_PTR_SPM = 0x8A22005B");
    spm_peek(32'h8A23_1010, d); check(d == 32'h9000_10EB, "STAK_CURR_PTR_DRAM = 0x900010EB");
    spm_peek(32'h8A22_005B, d); check(d == 32'h0BAD_F00D, "pushed word in the SPM");
    task_op(1, REQ_HEAP_LOAD, 0, w, c);
    check(w == 32'hF222_2222, "heap load after the store reads the new top");
    // the processor takes its time: the next request waits behind the full flag
    send(make_instr(CMD_TASK_ACCESS, 4'd1, REQ_STACK_PULL));
    send(make_instr(CMD_TASK_ACCESS, 4'd1, REQ_HEAP_LOAD));
    recv(w, c, 10);
    check(w == 32'h0BAD_F00D, "pull returns the pushed word");
    recv(w, c);
    check(w == 32'hF222_2222, "second request served after the first was read");
    check(n_full_seen > 0, "fsl_m_full held the processor back");
    // fill the frame of task 1 by pushing until the answer is 0xEEEEEEEE
    begin
      int pushes = 0;
      do begin
        task_op(1, REQ_STACK_PUSH, 32'h7000_0000 + pushes, w, c);
        pushes++;
      end while (w == RESP_DMA_NEEDED && pushes < 100);
      // heap at 0x...13, stack at 0x...5F: 18 pushes fit (while 0x17 < stack), the 19th is refused
      check(w == RESP_FULL && pushes == 19, $sformatf("frame full after %0d pushes", pushes));
      task_op(1, REQ_HEAP_STORE, 32'h1, w, c);
      check(w == RESP_FULL, "store into a full frame answers 0xEEEEEEEE");
    end
    // out of the SPM
    direct_write(32'h9000_0040, 32'h1234_5678);
    recv(w, c);
    check(w == 32'h9000_0040 && !c, "direct write outside the SPM sent back");
    direct_write(32'h8A23_0008, 32'h8A23_2000);
    direct_write(32'h8A23_2000, 32'h9000_0500);
    direct_write(32'h8A23_2004, 32'h9000_0900);
    task_op(2, REQ_HEAP_STORE, 32'h1, w, c);
    check(w == 32'h9000_0504 && !c, "task heap outside the SPM sent back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
