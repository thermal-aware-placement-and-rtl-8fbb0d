// msv_pkg: types shared by the thermal-aware block selection engine.
//
// Each floorplan block is described by its power density, switching
// activity, proximity factor and the electrical numbers that the delay and
// power models need. Fixed-point conventions (this design's choice):
// activities and the weights alpha, beta, gamma are Q0.8 fractions (value/256,
// below 1 as the cost function requires); voltages are in millivolts; the
// other quantities are unsigned integers in whatever unit the user picks,
// used consistently.
package msv_pkg;

  localparam int unsigned DW      = 16;  // width of block quantities
  localparam int unsigned COST_W  = 18;  // cost function result width
  localparam int unsigned POWER_W = 56;  // C_total * V^2 * f width

  // The three supply rails drawn in the voltage-island floorplan.
  typedef enum logic [1:0] {
    V_LOW    = 2'd0,
    V_MEDIUM = 2'd1,
    V_HIGH   = 2'd2
  } vlevel_e;

  typedef struct packed {
    logic [DW-1:0] power_density; // power per unit area
    logic [7:0]    activity;      // switching activity, Q0.8
    logic [DW-1:0] proximity;     // proximity factor P_B, eq. (5)
    logic [DW-1:0] c_charge;      // charged capacitance of the critical path, eq. (6)
    logic [DW-1:0] k_drive;       // process/drive constant k, eq. (6)
    logic [DW-1:0] c_total;       // total switched capacitance, eq. (7)
    logic          is_soft;         // soft block: dimensions may be changed
  } blk_in_t;

  // Placed rectangle of a block and its power dissipation, for the
  // proximity factor of eq. (5). Coordinates in any length unit.
  typedef struct packed {
    logic [DW-1:0] x;      // lower-left corner
    logic [DW-1:0] y;
    logic [DW-1:0] w;      // width
    logic [DW-1:0] h;      // height
    logic [DW-1:0] power;  // power dissipation p_i
  } blk_geom_t;

  typedef struct packed {
    logic [COST_W-1:0]  cost;        // eq. (4)
    logic [7:0]         rank;        // 0 = R1, the hottest block
    logic               hot;         // power density > mean + standard deviation
    logic               edge_place;  // to be placed along the chip edge
    vlevel_e            vlevel;      // assigned supply voltage
    logic               timing_met;  // delay at vlevel is below the critical timing
    logic [POWER_W-1:0] power;       // C_total * V^2 * f at vlevel, eq. (7)
    logic [COST_W+7:0]  whitespace;  // halo allotted around the block
    logic               resize;      // soft block above the thermal threshold
  } blk_out_t;

endpackage
