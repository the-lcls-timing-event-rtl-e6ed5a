// Test of evr_link_demux: a word stream framed like the EVG's (events or
// K28.5 above; databus on even, buffer channel on odd words below, with a
// K28.2 / data / K28.3 buffer in it) is encoded with the reference encoder and
// fed in.  Checks events, databus bytes and the buffer strobes and bytes.
module tb_evr_link_demux;
  import tb_ref_pkg::*;
  import lcls_timing_pkg::*;
  localparam int N = 600;
  logic clk = 0, rst = 1;
  logic [19:0] code = 0;
  logic [7:0] event_out, dbus, buf_byte;
  logic buf_start, buf_valid, buf_end, err;
  logic [7:0] ev [N], db [N], lo [N];
  logic       lk [N];
  int checks = 0, failures = 0, n_start = 0, n_end = 0, n_data = 0, exp_data = 0;

  evr_link_demux dut (.clk, .rst, .code, .event_out, .dbus, .buf_start, .buf_valid, .buf_end,
                      .buf_byte, .err);
  always #5 clk = ~clk;

  initial begin
    logic rd; int bpos;
    rd = 0; bpos = -1;
    for (int i = 0; i < N; i++) begin
      ev[i] = ($urandom % 3 == 0) ? 8'($urandom % 255 + 1) : 8'h00;
      if (i % 2 == 0) begin lo[i] = 8'($urandom); lk[i] = 0; db[i] = lo[i]; end
      else begin
        // buffer channel: idle, then one buffer of 50 bytes from word 101 on
        if (i == 101) begin lo[i] = K28_2; lk[i] = 1; bpos = 0; end
        else if (bpos >= 0 && bpos < 50) begin lo[i] = 8'($urandom); lk[i] = 0; bpos++; exp_data++; end
        else if (bpos == 50) begin lo[i] = K28_3; lk[i] = 1; bpos = 51; end
        else begin lo[i] = K28_0; lk[i] = 1; end
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < N; i++) begin
      code[19:10] = ref_enc(ev[i] == 0 ? K28_5 : ev[i], ev[i] == 0, rd);
      code[9:0]   = ref_enc(lo[i], lk[i], rd);
      @(negedge clk);
      checks++;
      if (event_out !== ev[i] || err) begin failures++; if (failures < 10) $display("FAIL event %0d: %h want %h", i, event_out, ev[i]); end
      if (i == 0) begin
        // the even/odd phase is learned from the first K in the lower byte
      end else if (i % 2 == 0) begin
        checks++;
        if (dbus !== db[i] || buf_valid || buf_start || buf_end) begin failures++; if (failures < 10) $display("FAIL dbus %0d: %h want %h", i, dbus, db[i]); end
      end else begin
        checks++;
        if (buf_start !== (lk[i] && lo[i] == K28_2) || buf_end !== (lk[i] && lo[i] == K28_3) ||
            buf_valid !== !lk[i] || (!lk[i] && buf_byte !== lo[i])) begin
          failures++; if (failures < 10) $display("FAIL buffer %0d", i);
        end
        if (buf_start) n_start++;
        if (buf_end) n_end++;
        if (buf_valid) n_data++;
      end
    end
    checks++; if (n_start != 1 || n_end != 1 || n_data != exp_data) begin failures++; $display("FAIL counts %0d %0d %0d", n_start, n_end, n_data); end
    code = 20'hFFFFF; @(negedge clk);
    checks++; if (!err) begin failures++; $display("FAIL no code error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
