// activation_function: the unipolar sigmoid, computed by linear interpolation
// in a lookup table.
//
// The 18-bit Q6.12 input x is split in two. Its upper 9 bits, x[17:9], pick
// one of 512 intervals, each 1/8 wide, covering -32 .. +32 (the index is the
// two's-complement upper part used directly as the memory address). Two
// lookup memories are read with that index: the interval memory gives the
// function value at the start of the interval (offset), the gradient memory
// gives the rise of the function across the interval (gradient, in Q6.12).
// The lower 9 bits x[8:0] are the unsigned position inside the interval;
// they are delayed one clock to meet the memory output and multiplied by the
// gradient. The sum
//     y = offset + (gradient * x[8:0]) >>> 9
// is registered at the output. Because the tables are RAMs written through
// the tbl_* port, any other activation function can be loaded the same way.
//
// Pipeline (latency 3 clocks, one result per clock):
//   clock 1  lookup memories read, x[8:0] registered;
//   clock 2  product registered, offset delayed one clock;
//   clock 3  sum registered -> out_valid/out_data.
//
// From the source design: the bit split, the two lookup memories, the
// multiplier, the one-clock delay of the offset, the adder and the output
// register. Chosen here: the meaning of the stored gradient (rise per
// interval, so the product is shifted right by 9), truncation of the product,
// the table write port, and that the lower bits feed only the multiplier
// (the upper bits address both memories).
module activation_function
  import ann_pkg::*;
#(
  parameter int IDX_W = 9,             // interval index bits, x[17:9]
  parameter int LOW_W = DATA_W - IDX_W // position bits, x[8:0]
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  data_t            in_data,
  output logic             out_valid,
  output data_t            out_data,
  // table load port
  input  logic             tbl_we_interval,
  input  logic             tbl_we_gradient,
  input  logic [IDX_W-1:0] tbl_addr,
  input  data_t            tbl_data
);

  localparam int DEPTH  = 2 ** IDX_W;
  localparam int PROD_W = DATA_W + LOW_W + 1;

  data_t interval_mem [DEPTH];
  data_t gradient_mem [DEPTH];

  logic [IDX_W-1:0] idx;
  data_t            offset1, gradient1;
  logic [LOW_W-1:0] low1;
  logic             v1, v2;
  data_t            offset2;
  logic signed [PROD_W-1:0] prod_full;
  data_t            prod2;

  assign idx = in_data[DATA_W-1 -: IDX_W];

  // Clock 1: lookup memories (block RAM, registered read).
  always_ff @(posedge clk) begin
    if (tbl_we_interval) interval_mem[tbl_addr] <= tbl_data;
    offset1 <= interval_mem[idx];
  end

  always_ff @(posedge clk) begin
    if (tbl_we_gradient) gradient_mem[tbl_addr] <= tbl_data;
    gradient1 <= gradient_mem[idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1   <= 1'b0;
      low1 <= '0;
    end else begin
      v1   <= in_valid;
      low1 <= in_data[LOW_W-1:0];
    end
  end

  // Clock 2: gradient times position; offset delayed.
  assign prod_full = PROD_W'(gradient1) * $signed({1'b0, low1});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2      <= 1'b0;
      offset2 <= '0;
      prod2   <= '0;
    end else begin
      v2      <= v1;
      offset2 <= offset1;
      prod2   <= data_t'(prod_full >>> LOW_W);
    end
  end

  // Clock 3: interpolated value.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= v2;
      out_data  <= offset2 + prod2;
    end
  end

endmodule
