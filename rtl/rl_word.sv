// rl_word: one word line of the redundant logic array.
//
// Three fields: FA (fault asserted), the faulty address and a data field. prog
// loads all three (FA = 1, the address, the correct data). The comparator
// matches cmp_addr against the address field of an asserted word. The data
// field is written through IE = match AND R/W (upd qualifies the request: a
// fault pulse carrying new correct data, or a normal-mode write) and read
// through OE = match AND NOT R/W, which gates dout (zero otherwise). The field
// layout and the IE/OE gating follow the source paper's word-line diagram; the
// qualifier and the zero output when not selected are this design's choices.
// Synchronous active-low reset clears FA.
module rl_word #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              prog,
  input  logic [ADDR_W-1:0] cmp_addr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              upd,
  input  logic              rw,
  output logic              fa,
  output logic              match,
  output logic [DATA_W-1:0] dout
);

  logic [ADDR_W-1:0] addr_f;
  logic [DATA_W-1:0] data_f;
  logic              ie, oe;

  assign match = fa && (addr_f == cmp_addr);
  assign ie    = match && rw && upd;
  assign oe    = match && !rw;
  assign dout  = oe ? data_f : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fa     <= 1'b0;
      addr_f <= '0;
      data_f <= '0;
    end else if (prog) begin
      fa     <= 1'b1;
      addr_f <= cmp_addr;
      data_f <= wdata;
    end else if (ie) begin
      data_f <= wdata;
    end
  end

endmodule
