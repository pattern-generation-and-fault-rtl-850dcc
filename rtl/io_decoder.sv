// io_decoder: I/O slot decoder of the diagnostic interface.
//
// The host reaches up to SLOTS parallel interfaces, each four byte registers
// wide, in one block of addresses starting at IO_BASE. During a valid memory
// cycle (vma high) an address inside the block raises exactly one bit of
// slot_sel (slot = address bits 4..2 for eight slots) and passes address bits
// 1..0 on as the register select of the chosen interface. The eight slots come
// from the description (one port, expandable to eight); the base 16'h8000 and
// the four-byte slot width are taken from the addresses the pattern program
// uses for its interface ($801A and $801B, so slot 6). Purely combinational.
module io_decoder #(
  parameter logic [15:0] IO_BASE = 16'h8000,
  parameter int unsigned SLOTS   = 8
) (
  input  logic [15:0]      addr,
  input  logic             vma,
  output logic [SLOTS-1:0] slot_sel,
  output logic [1:0]       rs
);

  localparam int unsigned SPAN = 4 * SLOTS;

  logic        in_block;
  logic [15:0] offset;
  assign offset   = addr - IO_BASE;
  assign in_block = vma && (addr >= IO_BASE) && ({16'h0, offset} < 32'(SPAN));

  always_comb begin
    slot_sel = '0;
    for (int i = 0; i < SLOTS; i++)
      slot_sel[i] = in_block && (offset[15:2] == 14'(i));
  end

  assign rs = addr[1:0];

endmodule
