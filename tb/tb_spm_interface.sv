// tb_spm_interface: the SPM interface in front of a small SPM block RAM.
// Checks that a decoder direct write lands in the SPM, that a handler read
// answers with data_exists and the right word exactly one cycle after it is
// accepted, that a handler write answers with write_ack one cycle later, that
// a direct write takes priority over a waiting handler access, and that no
// access is lost or repeated.
module tb_spm_interface;
  localparam int unsigned BYTES = 1024;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst, write_spm_active, read_data_spm, write_data_spm, data_exists, write_ack;
  logic [31:0] address_from_decoder, data_from_decoder, address_from_handler, data_from_handler;
  logic [31:0] data_to_handler, xil_bram_din_b, xil_bram_addr_b, xil_bram_dout_b;
  logic [3:0]  xil_bram_wen_b;
  logic        xil_bram_en_b, xil_bram_clk_b, xil_bram_rst_b;
  logic [31:0] ref_mem [BYTES/4];
  logic [31:0] rdata_a_unused;

  spm_interface dut (.*);
  spm_bram #(.BYTES(BYTES)) ram (
    .clk_a(clk), .en_a(1'b0), .we_a(4'h0), .addr_a(32'h0), .wdata_a(32'h0), .rdata_a(rdata_a_unused),
    .clk_b(xil_bram_clk_b), .en_b(xil_bram_en_b), .we_b(xil_bram_wen_b), .addr_b(xil_bram_addr_b),
    .wdata_b(xil_bram_dout_b), .rdata_b(xil_bram_din_b));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] a(int w);
    return 32'h8A22_0000 + 4*w;
  endfunction

  task automatic direct_write(int w, logic [31:0] d);
    @(negedge clk);
    write_spm_active = 1; address_from_decoder = a(w); data_from_decoder = d;
    ref_mem[w] = d;
    @(negedge clk);
    write_spm_active = 0;
  endtask

  // handler access; returns cycles from request to answer
  task automatic handler_access(bit wr, int w, logic [31:0] d, bit collide, output int cyc);
    @(negedge clk);
    address_from_handler = a(w); data_from_handler = d;
    if (wr) write_data_spm = 1; else read_data_spm = 1;
    if (collide) begin write_spm_active = 1; address_from_decoder = a((w + 1) % (BYTES/4)); data_from_decoder = ~d; ref_mem[(w + 1) % (BYTES/4)] = ~d; end
    cyc = 0;
    do begin
      @(posedge clk); #1; cyc++;
      write_spm_active = 0;
    end while (!(wr ? write_ack : data_exists) && cyc < 20);
    if (!wr) check(data_to_handler == ref_mem[w], $sformatf("read word %0d = %h expected %h", w, data_to_handler, ref_mem[w]));
    else ref_mem[w] = d;
    check(!(wr ? data_exists : write_ack), "only the answer of the access kind");
    @(negedge clk);
    read_data_spm = 0; write_data_spm = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, w;
    rst = 1; write_spm_active = 0; read_data_spm = 0; write_data_spm = 0;
    address_from_decoder = 0; data_from_decoder = 0; address_from_handler = 0; data_from_handler = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    check(xil_bram_rst_b == 1'b0, "BRAM reset follows rst");
    for (int i = 0; i < int'(BYTES/4); i++) direct_write(i, $urandom);
    for (int n = 0; n < 400; n++) begin
      w = $urandom_range(BYTES/4 - 1);
      handler_access(1'($urandom), w, $urandom, n % 7 == 3, cyc);
      check(cyc == (n % 7 == 3 ? 2 : 1), $sformatf("access answered after %0d cycles", cyc));
    end
    for (int i = 0; i < int'(BYTES/4); i++) begin
      handler_access(0, i, 0, 0, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
