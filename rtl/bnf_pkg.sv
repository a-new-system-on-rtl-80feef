// bnf_pkg -- types and constants shared by the braking-control chip.
//
// An event is the 20-bit word that describes one driving situation: the
// transmission position (1 bit), the distance relation of the two cars
// (2 bits), their distance in metres (6 bits), their relative speed in m/s
// (5 bits) and the driver's brake position (6 bits), packed in that order
// with the transmission bit on top. The field widths and the relation codes
// (11 not changing, 10 leaving, 01 closing, 00 stopped) are the ones the
// scenario table of the design uses. B_F (full brake, 63), the 100 % scale
// of the nervous factor and g = 9.8 m/s^2, mu = 0.8 come from the design's
// equations; holding g and mu as tenths is this implementation's choice.
package bnf_pkg;

  localparam int unsigned DIST_W  = 6;
  localparam int unsigned SPEED_W = 5;
  localparam int unsigned BRAKE_W = 6;
  localparam int unsigned NF_W    = 7;   // 0..100 percent

  localparam int unsigned B_F_DEF    = 63;   // brake at its bottom position
  localparam int unsigned N_FULL_DEF = 100;  // full nervous factor, percent
  localparam int unsigned G_X10_DEF  = 98;   // g in 0.1 m/s^2
  localparam int unsigned MU_X10_DEF = 8;    // friction coefficient in 0.1

  typedef enum logic [1:0] {
    REL_STOP    = 2'b00,
    REL_CLOSING = 2'b01,
    REL_LEAVING = 2'b10,
    REL_STEADY  = 2'b11
  } relation_e;

  typedef struct packed {
    logic               trans;     // 1: transmission engaged
    relation_e          relation;
    logic [DIST_W-1:0]  distance;      // m
    logic [SPEED_W-1:0] speed;     // m/s, relative to the car in front
    logic [BRAKE_W-1:0] brake;     // driver's brake position
  } event_t;

  // What the controller did with one event (flow of the decision chart).
  typedef enum logic [2:0] {
    ACT_NONE       = 3'd0,
    ACT_FULL_BRAKE = 3'd1,  // transmission off: brake fully
    ACT_LEARN      = 3'd2,  // driver brakes safely: store the driver's brake
    ACT_ABANDON    = 3'd3,  // driver brakes too little: store the BNF brake
    ACT_AUTO_EXP   = 3'd4,  // autonomous, from stored experience
    ACT_AUTO_BNF   = 3'd5   // autonomous, no experience: BNF brake
  } action_e;

endpackage
