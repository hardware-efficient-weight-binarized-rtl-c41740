// wbsnn_pkg: sizes and types shared by the weight-binarized spiking MLP.
//
// The network is 784-1023-1023-10: 784 pixel inputs, two hidden layers of
// 1023 spiking neurons and 10 output neurons. Hidden sizes are 2^k - 1 so that
// input 0 of every priority encoder stays free to mean "no spike left".
// Weights are one bit (1 = +1, 0 = -1); spikes are one bit.
// Pixel width, potential widths and the number of time steps are not fixed by
// the published design and are this implementation's choices.
package wbsnn_pkg;

  // Network shape (published main configuration)
  localparam int unsigned N_PIX   = 784;
  localparam int unsigned N_HID   = 1023;
  localparam int unsigned N_CLASS = 10;

  // Implementation choices
  localparam int unsigned PIX_W   = 8;   // sign-magnitude pixel: 1 sign + 7 magnitude bits
  localparam int unsigned ACC_W   = 20;  // input-layer accumulator (two's complement)
  localparam int unsigned CNT_W   = 16;  // up/down counter of FC neurons (two's complement)
  localparam int unsigned T_STEPS = 16;  // time steps per image

  // Control state of a spiking layer
  typedef enum logic [1:0] {
    L_IDLE  = 2'd0,  // waiting for input
    L_INTEG = 2'd1,  // integrating weights of active inputs
    L_FIRE  = 2'd2,  // comparing potentials with thresholds
    L_OUT   = 2'd3   // holding the output spike vector
  } layer_state_e;

endpackage
