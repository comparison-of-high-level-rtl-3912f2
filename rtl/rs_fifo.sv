// rs_fifo: synchronous FIFO with a valid/ready handshake on both sides.
//
// The decoder stages are decoupled by FIFOs so that each stage runs as soon as it has input and
// room for output; their depths set how far one stage may run ahead of the next. The largest is
// the received-data buffer that holds whole blocks until their error values are known.
// Storage is a plain array (one write port, one read port) addressed by wrapping pointers, with a
// counter for full/empty, so any DEPTH >= 1 works. Push is accepted when in_ready (not full);
// the head entry is shown on out_data while out_valid (not empty) and is removed when out_ready.
// A push and a pop may happen in the same cycle, also when full (the pop frees the slot first).
// Timing: data pushed in cycle c is visible at the output from cycle c+1.
// Reset clears the pointers; the storage itself is not reset.
module rs_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign out_valid = (count != 0);
  assign do_pop    = out_valid && out_ready;
  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]) || out_ready;
  assign do_push   = in_valid && in_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= in_data;
  end

  // handshake rules: never overflow or underflow
  assert property (@(posedge clk) disable iff (!rst_n) int'(count) <= int'(DEPTH));
  assert property (@(posedge clk) disable iff (!rst_n) do_pop |-> count != 0);
endmodule
