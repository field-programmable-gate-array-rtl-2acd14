// cnn_pkg: widths and types shared by the convolution accelerator.
//
// Feature-map values and kernel weights are signed two's-complement integers
// of DATA_W bits; products and sums are kept exactly in ACC_W bits, so the
// output of a layer is bit-exact against an integer reference model. The
// accelerator's objectives (convolution, ReLU, max pooling) come from the
// design description; the number formats are this implementation's choice.
package cnn_pkg;

  localparam int DATA_W = 8;   // input pixel and weight width
  localparam int ACC_W  = 32;  // accumulator / output width

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Host-programmable per-run options.
  typedef struct packed {
    logic relu_en;  // apply max(0,x) after the convolution
    logic pool_en;  // apply POOL x POOL max pooling after ReLU
  } layer_cfg_t;

  // Number of passes over the image when PAR output channels are computed at once.
  function automatic int n_groups(input int c_out, input int par);
    return (c_out + par - 1) / par;
  endfunction

endpackage
