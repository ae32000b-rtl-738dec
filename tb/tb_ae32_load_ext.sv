// Self-checking test of the load aligner/extender: random read words, offsets, sizes and
// signedness against a reference that picks bytes by little-endian lane.
module tb_ae32_load_ext;
  import ae32_pkg::*;
  logic [31:0] rdata, data; logic [1:0] addr_lo; msize_e size; logic sext;
  int checks = 0, failures = 0;
  ae32_load_ext dut (.*);

  initial begin
    repeat (5000) begin
      logic [31:0] e; logic [7:0] b; logic [15:0] h;
      rdata = $urandom; addr_lo = 2'($urandom); size = msize_e'($urandom_range(0, 2)); sext = 1'($urandom);
      #1;
      b = rdata >> (8 * addr_lo);
      h = addr_lo[1] ? rdata[31:16] : rdata[15:0];
      if (size == SZ_BYTE)      e = sext ? 32'($signed(b)) : 32'(b);
      else if (size == SZ_HALF) e = sext ? 32'($signed(h)) : 32'(h);
      else                      e = rdata;
      checks++;
      if (data !== e) begin failures++; $display("FAIL %h off %0d size %0d s %b: %h exp %h", rdata, addr_lo, size, sext, data, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
