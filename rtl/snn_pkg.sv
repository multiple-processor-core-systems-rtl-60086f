// snn_pkg: constants and types shared by the spiking-neural-network output layer.
//
// The layer has three somas (one per output class). Each soma owns one synapse per
// colour component of every input pixel; the synapses are stored in memories of
// N_ADDR words with N_LANE synapses per word, so a soma has N_ADDR*N_LANE synapses.
// With the default 4096 x 12 this is 49152 synapses per soma (a 128x128 RGB image),
// 147456 for the whole layer. The three somas, the 37-timestep frame, the +/-5 step
// learning window and the 4096-address sweep of the learning unit follow the source
// design; the 12 lanes per word, the 8-bit weight and the 6-bit timestep code are
// choices of this implementation.
//
// A synapse's firing time inside a frame is coded on T_W bits; the all-ones code
// (T_NONE) means that the input does not fire in this frame.
package snn_pkg;

  localparam int N_SOMA = 3;      // output neurons (classes)
  localparam int N_ADDR = 4096;   // synapse-memory words per soma
  localparam int N_LANE = 12;     // synapses per memory word
  localparam int N_STEP = 37;     // timesteps per frame
  localparam int WIN    = 5;      // learning window, timesteps on either side
  localparam int T_W    = 6;      // width of a timestep code
  localparam int W_W    = 8;      // width of an unsigned synaptic weight
  localparam int DW     = 12;     // maximum weight change (Delta W)

  localparam logic [T_W-1:0] T_NONE = '1;

  // Phase of the timestep reported by the control unit.
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,   // no frame running
    PH_ALPHA = 3'd1,   // waiting for the input encoder
    PH_BETA  = 3'd2,   // synapses activated, post-synaptic values summed
    PH_GAMMA = 3'd3,   // soma algorithm
    PH_LEARN = 3'd4    // learning pass after the last timestep
  } phase_t;

  // States of the learning unit, named after its state diagram.
  typedef enum logic [3:0] {
    L_IDLE         = 4'd0,
    L_CHECK_OUT    = 4'd1,
    L_POSITION     = 4'd2,
    L_READ_IMP     = 4'd3,
    L_ADDR_INC     = 4'd4,
    L_COMP         = 4'd5,
    L_READ_WEIGHT  = 4'd6,
    L_ADD_SUB      = 4'd7,
    L_WRITE_WEIGHT = 4'd8
  } lstate_t;

endpackage
