// rl_array: redundant logic array, the repair side of the self-repair scheme.
//
// RL_WORDS redundant words (rl_word), filled in order. A fault pulse from the
// fault diagnosis carries a faulty address and its correct data: if a word
// already holds that address its data field is rewritten, otherwise the next
// free word is programmed; with no free word left the sticky overflow flag is
// set, meaning the memory can no longer be repaired. In normal mode (rla_ena)
// every access is compared with the stored addresses: a write to a repaired
// address also updates the word's data field, and a read registers hit and the
// word's data, so that on the next cycle they line up with the synchronous
// memory's output in the output multiplexer. Reuse of a word for a repeated
// address, the fill order and the registered read are this design's choices.
// used counts programmed words; fa shows which words are programmed. Synchronous active-low reset.
module rl_array #(
  parameter int unsigned ADDR_W   = 4,
  parameter int unsigned DATA_W   = 1,
  parameter int unsigned RL_WORDS = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          rla_ena,
  input  logic                          fault,
  input  logic [ADDR_W-1:0]             fault_addr,
  input  logic [DATA_W-1:0]             fault_data,
  input  logic [ADDR_W-1:0]             addr,
  input  logic [DATA_W-1:0]             din,
  input  logic                          rd,
  input  logic                          wr,
  output logic                          hit,
  output logic [DATA_W-1:0]             dout,
  output logic                          overflow,
  output logic [$clog2(RL_WORDS+1)-1:0] used,
  output logic [RL_WORDS-1:0]           fa
);

  logic [ADDR_W-1:0]   cmp_addr;
  logic [DATA_W-1:0]   wdata;
  logic                upd, rw;
  logic [RL_WORDS-1:0] match, prog;
  logic [DATA_W-1:0]   wout [RL_WORDS];
  logic                any_match, full;
  logic [DATA_W-1:0]   rd_data;

  // A fault pulse (test mode) takes the comparators; otherwise the normal access.
  assign cmp_addr = fault ? fault_addr : addr;
  assign wdata    = fault ? fault_data : din;
  assign upd      = fault || (rla_ena && wr && !rd);
  assign rw       = fault || wr;

  assign any_match = |match;
  assign full      = (32'(used) >= RL_WORDS);

  always_comb begin
    for (int unsigned w = 0; w < RL_WORDS; w++)
      prog[w] = fault && !any_match && (32'(used) == w);
  end

  for (genvar w = 0; w < RL_WORDS; w++) begin : g_word
    rl_word #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_word (
      .clk     (clk),
      .rst_n   (rst_n),
      .prog    (prog[w]),
      .cmp_addr(cmp_addr),
      .wdata   (wdata),
      .upd     (upd),
      .rw      (rw),
      .fa      (fa[w]),
      .match   (match[w]),
      .dout    (wout[w])
    );
  end

  always_comb begin
    rd_data = '0;
    for (int unsigned w = 0; w < RL_WORDS; w++) rd_data |= wout[w];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hit      <= 1'b0;
      dout     <= '0;
      overflow <= 1'b0;
      used     <= '0;
    end else begin
      if (fault) begin
        if (!any_match && !full) used <= used + 1'b1;
        if (!any_match && full)  overflow <= 1'b1;
      end
      if (!fault && rla_ena && rd && !wr) begin
        hit  <= any_match;
        dout <= rd_data;
      end
    end
  end

  // One word per address: never more than one comparator hit, one word programmed.
  a_one_match: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(match));
  a_one_prog:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(prog));

endmodule
