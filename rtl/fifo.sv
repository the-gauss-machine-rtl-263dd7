// fifo: synchronous first-in first-out buffer for the array's operand and
// result streams.
//
// The paper names FIFOs on the array's west and south inputs and its east
// outputs, but gives no depth or interface. This design's choice: a
// single-clock FIFO with a show-ahead read port, so rd_data always shows the
// oldest word. Asserting rd_en pops it. A word written into an empty FIFO
// can be read in the next cycle. count gives the fill level, which the array
// controller uses to start an operation only once all its operands are in.
// Reset (active low, synchronous) empties it. Writing when full and reading
// when empty are errors, and assertions catch them.
module fifo #(
  parameter int unsigned WIDTH = 42,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (wr_en && !full) wp <= inc(wp);
      if (rd_en && !empty) rp <= inc(rp);
      count <= count + CW'(wr_en && !full) - CW'(rd_en && !empty);
    end
  end

  assign rd_data = mem[rp];
  assign empty   = (count == '0);
  assign full    = (32'(count) == DEPTH);

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule
