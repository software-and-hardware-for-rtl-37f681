// tb_spm_bram: checks the dual-port SPM block RAM against a reference array.
// Random reads and byte-masked writes on both ports (ports never hit the same
// word in one cycle); read data is compared one cycle after the address.
module tb_spm_bram;
  localparam int unsigned BYTES = 4096;
  localparam int unsigned WORDS = BYTES / 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        en_a, en_b;
  logic [3:0]  we_a, we_b;
  logic [31:0] addr_a, addr_b, wdata_a, wdata_b, rdata_a, rdata_b;
  logic [31:0] ref_mem [WORDS];

  spm_bram #(.BYTES(BYTES)) dut (.*, .clk_a(clk), .clk_b(clk));

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] nw, logic [3:0] be);
    for (int i = 0; i < 4; i++) if (be[i]) old[8*i +: 8] = nw[8*i +: 8];
    return old;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_a, exp_b;
    int wa, wb;
    logic rd_a, rd_b;
    en_a = 0; en_b = 0; we_a = 0; we_b = 0; addr_a = 0; addr_b = 0; wdata_a = 0; wdata_b = 0;
    // fill through both ports
    for (int i = 0; i < int'(WORDS); i++) begin
      @(negedge clk);
      ref_mem[i] = $urandom;
      if (i % 2 == 0) begin en_a = 1; we_a = 4'hF; addr_a = 32'h8A22_0000 + 4*i; wdata_a = ref_mem[i]; en_b = 0; end
      else            begin en_b = 1; we_b = 4'hF; addr_b = 32'h8A22_0000 + 4*i; wdata_b = ref_mem[i]; en_a = 0; end
    end
    @(negedge clk); en_a = 0; en_b = 0; we_a = 0; we_b = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      wa = $urandom_range(WORDS-1);
      wb = $urandom_range(WORDS-1);
      if (wb == wa) wb = (wa + 1) % WORDS;
      en_a = 1; en_b = 1;
      we_a = $urandom_range(3) == 0 ? 4'($urandom) : 4'h0;
      we_b = $urandom_range(3) == 0 ? 4'($urandom) : 4'h0;
      addr_a = {15'h4511, 15'(wa), 2'($urandom)};
      addr_b = {15'h4511, 15'(wb), 2'($urandom)};
      wdata_a = $urandom; wdata_b = $urandom;
      exp_a = ref_mem[wa]; exp_b = ref_mem[wb];
      ref_mem[wa] = merge(ref_mem[wa], wdata_a, we_a);
      ref_mem[wb] = merge(ref_mem[wb], wdata_b, we_b);
      @(posedge clk); #1;
      checks += 2;
      if (rdata_a !== exp_a) begin failures++; $display("port A word %0d: %h expected %h", wa, rdata_a, exp_a); end
      if (rdata_b !== exp_b) begin failures++; $display("port B word %0d: %h expected %h", wb, rdata_b, exp_b); end
    end
    // read back everything through port B
    en_a = 0; we_a = 0; we_b = 0;
    for (int i = 0; i < int'(WORDS); i++) begin
      @(negedge clk); en_b = 1; addr_b = 32'h8A22_0000 + 4*i;
      @(posedge clk); #1;
      checks++;
      if (rdata_b !== ref_mem[i]) begin failures++; $display("final word %0d: %h expected %h", i, rdata_b, ref_mem[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
