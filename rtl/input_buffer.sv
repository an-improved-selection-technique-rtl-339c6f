// input_buffer: the small flit memory in front of each switch input.
//
// A first-in first-out queue of DEPTH words of WIDTH bits, written by the
// upstream link and read by the switch. The evaluated configuration uses a
// buffer of five flits per input channel; the CAGIS proposal gives no more about
// its insides, so this is a plain circular buffer with read and write
// indices that wrap at DEPTH (DEPTH need not be a power of two) and an
// occupancy counter.
//
// Interface: push side in_valid/in_ready/in_data, pop side
// out_valid/out_ready/out_data. in_ready is simply "not full" and out_valid
// "not empty", both straight from registers, so neither side sees a
// combinational path from the other; a push and a pop can happen in the
// same cycle. The front word is visible combinationally (show-ahead).
// count reports the occupancy.
module input_buffer #(
  parameter int unsigned WIDTH = 34,
  parameter int unsigned DEPTH = 5
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [WIDTH-1:0]          in_data,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [WIDTH-1:0]          out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [IDX_W-1:0] wr_idx, rd_idx;
  logic             do_push, do_pop;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_idx];
  assign do_push   = in_valid  && in_ready;
  assign do_pop    = out_valid && out_ready;

  function automatic logic [IDX_W-1:0] next_idx(logic [IDX_W-1:0] i);
    return (i == IDX_W'(DEPTH - 1)) ? '0 : i + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_idx <= '0;
      rd_idx <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_idx <= next_idx(wr_idx);
      if (do_pop)  rd_idx <= next_idx(rd_idx);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_idx] <= in_data;
  end

  // A push is never accepted while full, a pop never taken while empty.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    int'(count) <= DEPTH);

endmodule
