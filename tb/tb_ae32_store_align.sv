// Self-checking test of the address generator and store aligner: random base, offset,
// size and data; checks the sum, the lane replication and the byte enables.
module tb_ae32_store_align;
  import ae32_pkg::*;
  logic [31:0] base, offset, data, addr, wdata; msize_e size; logic [3:0] be;
  int checks = 0, failures = 0;
  ae32_store_align dut (.*);

  initial begin
    repeat (5000) begin
      logic [31:0] ea; logic [3:0] ebe;
      base = $urandom; offset = $urandom; data = $urandom; size = msize_e'($urandom_range(0, 2));
      #1;
      ea = base + offset;
      case (size)
        SZ_BYTE: ebe = 4'b1 << ea[1:0];
        SZ_HALF: ebe = ea[1] ? 4'hC : 4'h3;
        default: ebe = 4'hF;
      endcase
      checks++;
      if (addr !== ea || be !== ebe) begin failures++; $display("FAIL addr/be %h %b", addr, be); end
      for (int l = 0; l < 4; l++) if (ebe[l]) begin
        logic [7:0] eb;
        eb = (size == SZ_BYTE) ? data[7:0] : (size == SZ_HALF) ? data[8*(l%2) +: 8] : data[8*l +: 8];
        checks++;
        if (wdata[8*l +: 8] !== eb) begin failures++; $display("FAIL lane %0d size %0d", l, size); end
      end
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
