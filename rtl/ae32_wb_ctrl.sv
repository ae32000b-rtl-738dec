// Write-back control and the MEM/WB register.
//
// In MEM it selects the value to write back: aligned load data for loads, the EX/MEM
// result (ALUOUT) otherwise. At the clock edge the selection, the destination register
// and the write enable are captured into the MEM/WB register (the write-back bus), which
// drives the register-file write port in WB. While MEM is held the register inserts no
// write, so a held instruction is written back exactly once.
//
// The WB control block and write-back bus follow the source design; one write-back bus
// instead of two is this implementation's choice.
module ae32_wb_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mem_stall,
  input  logic        mem_valid,
  input  logic        mem_rd_wr,
  input  logic        mem_load,
  input  logic [3:0]  mem_rd,
  input  logic [31:0] aluout,
  input  logic [31:0] load_data,
  output logic        wb_we,
  output logic [3:0]  wb_rd,
  output logic [31:0] wb_data
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_we   <= 1'b0;
      wb_rd   <= '0;
      wb_data <= '0;
    end else begin
      wb_we   <= mem_valid && mem_rd_wr && !mem_stall;
      wb_rd   <= mem_rd;
      wb_data <= mem_load ? load_data : aluout;
    end
  end
endmodule
