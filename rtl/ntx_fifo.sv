// ntx_fifo: synchronous first-in first-out buffer.
//
// The NTX decouples its controller, memory ports and datapath with FIFOs
// (command FIFO of 5 entries, read address/data FIFOs of 5 entries, store
// address/data FIFOs of 7 entries). This is the one FIFO used for all of
// them: a circular buffer of DEPTH entries with a head and tail pointer and
// an occupancy counter. Any DEPTH >= 1 works (not only powers of two).
// Interface: push with push_i when !full_o, pop with pop_i when !empty_o;
// data_o shows the head entry combinationally. A push and a pop in the
// same cycle are both taken when the FIFO is neither empty nor full.
// Timing: a pushed word can be popped the next cycle (no fall-through).
module ntx_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 5
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             push_i,
  input  logic [WIDTH-1:0] data_i,
  input  logic             pop_i,
  output logic [WIDTH-1:0] data_o,
  output logic             full_o,
  output logic             empty_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem_q [DEPTH];
  logic [PW-1:0]    rd_q, wr_q;
  logic [CW-1:0]    cnt_q;
  logic             do_push, do_pop;

  assign full_o  = (cnt_q == CW'(DEPTH));
  assign empty_o = (cnt_q == '0);
  assign count_o = cnt_q;
  assign data_o  = mem_q[rd_q];
  assign do_push = push_i && !full_o;
  assign do_pop  = pop_i && !empty_o;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '0;
    end else begin
      if (do_push) begin
        mem_q[wr_q] <= data_i;
        wr_q        <= next_ptr(wr_q);
      end
      if (do_pop) rd_q <= next_ptr(rd_q);
      cnt_q <= cnt_q + CW'(do_push) - CW'(do_pop);
    end
  end

  // A push into a full FIFO or a pop from an empty one is a protocol error.
  assert property (@(posedge clk_i) disable iff (!rst_ni) !(push_i && full_o));
  assert property (@(posedge clk_i) disable iff (!rst_ni) !(pop_i && empty_o));
endmodule
