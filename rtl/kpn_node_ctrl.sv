// Read / execute / write shell of one hardware node of the process network.
//
// Every node fires once per iteration of the algorithm's loop. The shell
// sequences a firing in three phases, one unit each:
//   READ    wait until every input link holds a token (in_avail all high);
//   EXECUTE one cycle with exec_en high: the node computes from the tokens at
//           the heads of its input links and registers its results, and the
//           shell pops one token from every input (in_pop);
//   WRITE   wait until every output link has space (out_space all high), then
//           push the results into all of them at once (out_push).
// A node therefore works only when it has data and room for its results, and
// runs independently of the others. The iteration counter iter counts firings
// from 1 to WIDTH and wraps, so that a node keeps track of which loop
// iteration it is in; iter_last is high during the last one. The phase
// structure and the counter follow the node shell of the design flow; a
// one-cycle execute phase and the wrapping count are this design's choices.
// Minimum time per firing is 3 cycles.
module kpn_node_ctrl #(
  parameter int N_IN  = 1,
  parameter int N_OUT = 1,
  parameter int WIDTH = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_IN-1:0]  in_avail,
  output logic [N_IN-1:0]  in_pop,
  output logic             exec_en,
  input  logic [N_OUT-1:0] out_space,
  output logic [N_OUT-1:0] out_push,
  output logic             writing,
  output logic [$clog2(WIDTH+1)-1:0] iter,
  output logic             iter_last
);

  typedef enum logic [1:0] {S_READ, S_EXEC, S_WRITE} phase_t;
  phase_t phase;

  localparam int CW = $clog2(WIDTH + 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= S_READ;
      iter  <= CW'(1);
    end else begin
      unique case (phase)
        S_READ:  if (&in_avail) phase <= S_EXEC;
        S_EXEC:  phase <= S_WRITE;
        S_WRITE: if (&out_space) begin
          phase <= S_READ;
          iter  <= iter_last ? CW'(1) : iter + 1'b1;
        end
        default: phase <= S_READ;
      endcase
    end
  end

  assign exec_en   = (phase == S_EXEC);
  assign in_pop    = {N_IN{exec_en}};
  assign writing   = (phase == S_WRITE);
  assign out_push  = {N_OUT{writing && (&out_space)}};
  assign iter_last = (int'(iter) == WIDTH);

  // Tokens that were present in READ are still there in EXECUTE: nothing else
  // consumes from a node's input links.
  a_tokens_held: assert property (@(posedge clk) disable iff (!rst_n)
    exec_en |-> &in_avail);

endmodule
