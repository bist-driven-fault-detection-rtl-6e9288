// inst_ptr: instruction pointer of the microcode BIST controller.
//
// Holds InstAddr, the address of the microcode word to fetch, and the address of
// the first word of the March element being executed. On InstEna it moves on:
// after a first or in-between operation (Fo or Io set) it steps to the next word;
// after the last operation of an element (Lo set) or a single-operation element
// (Fo = Io = Lo = 0) it jumps back to the element's first word, so that the same
// operations are applied to the next address, unless Over says the address
// generator has reached its last address, in which case it steps to the next
// element. The loop-back rule is this design's reading of how Fo/Io/Lo and Over
// (both shown entering the pointer in the source paper's block diagram) are used.
// clr restarts at word 0. Synchronous, active-low reset; one-cycle update.
module inst_ptr #(
  parameter int unsigned IADDR_W = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  input  logic               inst_ena,
  input  logic [2:0]         inst_op_fil,   // {Fo, Io, Lo}
  input  logic               over,
  output logic [IADDR_W-1:0] inst_addr
);

  logic [IADDR_W-1:0] elem_start;
  logic               elem_end;

  // Last word of an element: Lo set, or a single-operation word.
  assign elem_end = inst_op_fil[0] || (inst_op_fil == 3'b000);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      inst_addr  <= '0;
      elem_start <= '0;
    end else if (inst_ena) begin
      if (!elem_end) begin
        inst_addr <= inst_addr + 1'b1;
      end else if (over) begin
        inst_addr  <= inst_addr + 1'b1;
        elem_start <= inst_addr + 1'b1;
      end else begin
        inst_addr <= elem_start;
      end
    end
  end

endmodule
