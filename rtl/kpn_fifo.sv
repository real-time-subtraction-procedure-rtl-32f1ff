// Communication link of the process network: a synchronous first-in
// first-out buffer between the write unit of one node and the read unit of
// the next.
//
// A producer pushes a token with wr_en while full is low; a consumer sees the
// oldest token on rd_data whenever empty is low (show-ahead) and removes it
// with rd_en. A push and a pop may happen in the same cycle. DEPTH is the
// link size in tokens. INIT_TOKENS tokens of value zero sit in the buffer
// after reset: this is how a feedback link carries the initial value that the
// algorithm's first iteration reads (the "<0>" sources of the network). The
// link sizes are this design's choice: the network's sizes come from a
// link-size optimisation whose results are not published.
module kpn_fifo #(
  parameter int DW          = 32,
  parameter int DEPTH       = 4,
  parameter int INIT_TOKENS = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  output logic          full,
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic          empty
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  function automatic logic [AW-1:0] bump(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= AW'(INIT_TOKENS % DEPTH);
      count  <= (AW+1)'(INIT_TOKENS);
    end else begin
      if (do_wr) wr_ptr <= bump(wr_ptr);
      if (do_rd) rd_ptr <= bump(rd_ptr);
      if (do_wr && !do_rd)      count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
    end
  end

  // Storage is cleared at reset; the first INIT_TOKENS slots then hold the
  // initial zero tokens.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (do_wr) begin
      mem[wr_ptr] <= wr_data;
    end
  end

  assign rd_data = mem[rd_ptr];
  assign full    = (int'(count) == DEPTH);
  assign empty   = (count == '0);

  initial begin
    assert (INIT_TOKENS <= DEPTH) else $error("kpn_fifo: INIT_TOKENS exceeds DEPTH");
  end

  // Handshake rules: a producer never pushes into a full link and a consumer
  // never pops an empty one.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty);

endmodule
