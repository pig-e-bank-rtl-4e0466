// coin_mux: the custom datapath that turns a coin sensor code into the coin's
// BCD value (the "mux6_7x" block).
//
// An inverter-buffer produces the true and complement copies of the 3-bit
// sensor code, and WIDTH mux6_1x slices each pick one bit of the coin value.
// The six data inputs of every slice are tied to constants: 0 for "no coin"
// and the BCD amounts 1, 5, 10, 25 and 100 cents for penny, nickel, dime,
// quarter and dollar. Output bit i of the result is slice i. Purely
// combinational; the value is registered at the input of the summing module.
//
// The structure (select buffer plus a row of 6:1 slices with hard-wired
// inputs) and the sensor codes follow the design. The constants are BCD, as
// the design's text and reference model specify, so WIDTH defaults to 16 (the
// full BCD total width) rather than the seven slices of the laid-out
// datapath, which cannot hold BCD 100.
module coin_mux
  import pig_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [2:0]       sensors,
  output logic [WIDTH-1:0] coin
);

  // Constant data inputs, one vector per select code.
  localparam logic [WIDTH-1:0] IN_U = WIDTH'(COIN_NONE);
  localparam logic [WIDTH-1:0] IN_V = WIDTH'(COIN_PENNY);
  localparam logic [WIDTH-1:0] IN_W = WIDTH'(COIN_NICKEL);
  localparam logic [WIDTH-1:0] IN_X = WIDTH'(COIN_DIME);
  localparam logic [WIDTH-1:0] IN_Y = WIDTH'(COIN_QUARTER);
  localparam logic [WIDTH-1:0] IN_Z = WIDTH'(COIN_DOLLAR);

  // inverter-buffer: true and complement selects
  logic [2:0] s_buf;
  logic [2:0] sb_buf;
  assign s_buf  = sensors;
  assign sb_buf = ~sensors;

  for (genvar i = 0; i < WIDTH; i++) begin : g_slice
    mux6_1x u_slice (
      .u (IN_U[i]),
      .v (IN_V[i]),
      .w (IN_W[i]),
      .x (IN_X[i]),
      .y (IN_Y[i]),
      .z (IN_Z[i]),
      .s (s_buf),
      .sb(sb_buf),
      .f (coin[i])
    );
  end

endmodule
