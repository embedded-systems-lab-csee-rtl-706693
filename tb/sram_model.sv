// sram_model: behavioural model of an asynchronous 256K x 16 SRAM for
// simulation only (chip enable, output enable and byte enables assumed
// active). Reads are combinational: dq_o shows mem[addr] whenever WE_n is high.
// While WE_n is low the word on dq_i is written to mem[addr]; the write is
// level sensitive, so the word present when WE_n rises is the one kept.
module sram_model #(
  parameter int unsigned AW = 18,
  parameter int unsigned DW = 16
) (
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] dq_i,
  output logic [DW-1:0] dq_o,
  input  logic          we_n
);
  logic [DW-1:0] mem [2**AW];

  initial for (int i = 0; i < 2**AW; i++) mem[i] = DW'(i * 7 + 3);

  always @* if (!we_n) mem[addr] = dq_i;

  assign dq_o = we_n ? mem[addr] : '0;
endmodule
