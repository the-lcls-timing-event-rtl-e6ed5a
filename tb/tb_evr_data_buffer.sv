// Test of evr_data_buffer: two received buffers (a short one and a full 2K
// one) must be stored, their lengths latched and the interrupt raised at the
// end and held until cleared; bytes outside a buffer are ignored.
module tb_evr_data_buffer;
  localparam int D = 2048;
  logic clk = 0, rst = 1, buf_start = 0, buf_valid = 0, buf_end = 0, irq_clr = 0, irq;
  logic [7:0]  byte_in = 0, rdata;
  logic [10:0] raddr = 0;
  logic [11:0] rx_len;
  logic [7:0]  ref_mem [D];
  int checks = 0, failures = 0;

  evr_data_buffer #(.DEPTH(D)) dut (.clk, .rst, .buf_start, .buf_valid, .buf_end, .byte_in,
                                    .raddr, .rdata, .irq_clr, .irq, .rx_len);
  always #5 clk = ~clk;

  task automatic receive(input int n);
    @(negedge clk) buf_start = 1;
    @(negedge clk) buf_start = 0;
    for (int i = 0; i < n; i++) begin
      ref_mem[i] = 8'($urandom);
      @(negedge clk) begin buf_valid = 1; byte_in = ref_mem[i]; end
      @(negedge clk) buf_valid = 0;
      checks++; if (irq) begin failures++; $display("FAIL early irq"); end
    end
    @(negedge clk) buf_end = 1;
    @(negedge clk) buf_end = 0;
    checks++; if (!irq || rx_len != 12'(n)) begin failures++; $display("FAIL irq %0d len %0d want %0d", irq, rx_len, n); end
    for (int i = 0; i < n; i++) begin
      raddr = 11'(i);
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[i]) begin failures++; if (failures < 10) $display("FAIL byte %0d %h want %h", i, rdata, ref_mem[i]); end
    end
    checks++; if (!irq) begin failures++; $display("FAIL irq not held"); end
    @(negedge clk) irq_clr = 1;
    @(negedge clk) irq_clr = 0;
    checks++; if (irq) begin failures++; $display("FAIL irq not cleared"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // stray bytes and end before any start
    @(negedge clk) begin buf_valid = 1; byte_in = 8'h55; end
    @(negedge clk) begin buf_valid = 0; buf_end = 1; end
    @(negedge clk) buf_end = 0;
    checks++; if (irq) begin failures++; $display("FAIL irq without buffer"); end
    receive(10);
    receive(D);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
