// Synchronization block between the first-stage decoder (FSM1) and the 9C
// decoder (FSM2).
//
// FSM1 writes the 9C-coded stream it rebuilds, one bit per clock, and FSM2
// reads it one bit per clock at its own pace, so the two decoders work at the
// same time. The block holds a small memory, a write-pointer register and a
// read-pointer register, a read MUX that picks the stored bit at the read
// pointer, and XOR gates that compare the two pointers: when the XOR of the
// pointers is zero the memory is empty, and when only the wrap bit differs it
// is full. 9C_EN (rd_valid) tells FSM2 that a bit is available. The parts list
// (memory, register, MUX, XOR compare, control) follows the architecture; the
// first-in first-out organisation and the depth are this design's own reading
// of it.
//
// Interface: write side wr_valid/wr_bit/wr_ready, read side
// rd_valid/rd_bit/rd_pop, both in the system clock domain. A write and a read
// can happen in the same cycle. A written bit can be read one clock later.
module sync_block #(
  parameter int unsigned DEPTH = 16,                    // bits of storage, power of two
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic clk,
  input  logic rst_n,          // synchronous, active low
  // from FSM1
  input  logic wr_valid,
  input  logic wr_bit,
  output logic wr_ready,
  // to FSM2
  output logic rd_valid,       // 9C_EN
  output logic rd_bit,         // DATA_IN1
  input  logic rd_pop,
  // status
  output logic full,
  output logic empty
);

  logic          mem [DEPTH];
  logic [AW:0]   wptr, rptr;
  logic [AW:0]   diff;

  assign diff     = wptr ^ rptr;
  assign empty    = (diff == '0);
  assign full     = (diff == {1'b1, {AW{1'b0}}});
  assign wr_ready = !full;
  assign rd_valid = !empty;
  assign rd_bit   = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_valid && !full) mem[wptr[AW-1:0]] <= wr_bit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (wr_valid && !full) wptr <= wptr + 1'b1;
      if (rd_pop && !empty)  rptr <= rptr + 1'b1;
    end
  end

  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n)
    rd_pop |-> !empty);

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("sync_block: DEPTH must be a power of two");
  end

endmodule
