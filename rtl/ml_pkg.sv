// ml_pkg: types and constants shared by the FPGA training worker.
//
// The worker trains several small fully connected networks at once. All
// memory in the worker is one word-addressed space: the top address bit picks
// on-chip block RAM (M9K) over off-chip SDRAM. A "memory handle" describes one
// private region of that space together with the request/response signals a
// client uses to access it; here it is split into a request struct driven by
// the client and a response struct driven by the memory unit.
//
// Numbers are signed fixed point with FRAC_BITS fraction bits in a DATA_W word
// (this design's choice; the source names the arithmetic units "FPUs" without
// defining a number format).
//
// No logic and no timing: types, constants and one combinational function.
package ml_pkg;

  parameter int unsigned DATA_W    = 32;  // word width
  parameter int unsigned ADDR_W    = 24;  // word address; bit 23 selects M9K
  parameter int unsigned FRAC_BITS = 16;  // Q16.16

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Client side of a memory handle: region bounds, pointer and strobes.
  // r_en / w_en / flush are held until the matching done pulse. The *_through
  // bits bypass the port cache for that access; flush (this design's
  // addition) writes the port cache back and empties it, so that data
  // written through one handle can be read through another.
  typedef struct packed {
    addr_t region_begin;
    addr_t region_end;    // exclusive
    addr_t ptr;           // absolute word address inside the region
    logic  w_en;
    logic  r_en;
    logic  write_through;
    logic  read_through;
    logic  flush;
    word_t data_store;
  } mh_req_t;

  // Memory side of a memory handle.
  typedef struct packed {
    logic  avail;         // port idle, a request may be issued
    logic  done;          // one-cycle pulse: request finished
    word_t data_load;     // read data, valid with done
  } mh_rsp_t;

  // Word command from a port controller to a memory controller. req is held
  // while the port owns the controller; each word completes with ack.
  typedef struct packed {
    logic  req;
    logic  valid;
    logic  we;
    addr_t addr;
    word_t wdata;
  } mem_cmd_t;

  typedef struct packed {
    logic  ack;
    word_t rdata;
  } mem_ack_t;

  // FPU operations (equations 3 to 12 of the operation list).
  typedef enum logic [3:0] {
    OP_NONE      = 4'd0,
    OP_LIN_FWD   = 4'd1,  // z = W x + b
    OP_LIN_BWD   = 4'd2,  // dx = W^T dz
    OP_LIN_WGRAD = 4'd3,  // dW = dz x^T
    OP_LIN_WUPD  = 4'd4,  // W = W + lr dW   (also the bias update)
    OP_LIN_BGRAD = 4'd5,  // db = dz
    OP_LIN_BUPD  = 4'd6,  // b = b + lr db
    OP_RELU_FWD  = 4'd7,  // z = max(x, 0)
    OP_RELU_BWD  = 4'd8,  // dx = (x > 0) ? dz : 0
    OP_MSE_FWD   = 4'd9,  // L = sum (y - yhat)^2
    OP_MSE_BWD   = 4'd10  // dyhat = -2 (y - yhat)
  } fpu_op_e;

  // One job on a Model Manager's FPU Bank port. Handle h1/h2/h3 regions are
  // carried in the memory handles themselves; the job adds the sizes.
  typedef struct packed {
    fpu_op_e op;
    logic [15:0] n_out;   // rows of W / vector length
    logic [15:0] n_in;    // columns of W
    word_t       scalar;  // learning rate for the update operations
  } fpu_job_t;

  // Layer types in a model image.
  localparam word_t LAYER_LINEAR = 32'd1;
  localparam word_t LAYER_RELU   = 32'd2;

  // Model image layout, word offsets from the model's base address.
  localparam int unsigned HDR_NLAYERS = 0;
  localparam int unsigned HDR_LR      = 1;
  localparam int unsigned HDR_NOUT    = 2;
  localparam int unsigned HDR_LOSS    = 3;
  localparam int unsigned HDR_WORDS   = 4;
  localparam int unsigned DESC_WORDS  = 8;
  // Descriptor fields
  localparam int unsigned D_TYPE  = 0;
  localparam int unsigned D_IN    = 1;
  localparam int unsigned D_OUT   = 2;
  localparam int unsigned D_PARAM = 3;  // W (column-major) followed by b
  localparam int unsigned D_Z     = 4;  // layer output
  localparam int unsigned D_DZ    = 5;  // gradient of the output
  localparam int unsigned D_GRAD  = 6;  // dW followed by db
  localparam int unsigned D_MAX   = 7;  // fields read per layer

  // Commands from the Data Pipeline Router to a Model Manager.
  typedef enum logic [1:0] {
    MMC_ASSIGN = 2'd0,   // take the model in [begin, end)
    MMC_TRAIN  = 2'd1,   // train on the sample in [begin, end)
    MMC_METRIC = 2'd2,   // export the loss
    MMC_MODEL  = 2'd3    // export the whole model image
  } mm_cmd_e;

  // Model Manager states (the source's Model Manager state diagram).
  typedef enum logic [2:0] {
    MM_UNASSIGNED    = 3'd0,
    MM_ASSIGNED      = 3'd1,
    MM_FORWARD       = 3'd2,
    MM_BACKWARD      = 3'd3,   // backward / update
    MM_EXPORT_METRIC = 3'd4,
    MM_EXPORT_MODEL  = 3'd5
  } mm_phase_e;

  // Host packet opcodes (first byte of a packet on the SPI link).
  localparam logic [7:0] PKT_ASN_MODEL  = 8'h01;
  localparam logic [7:0] PKT_SAMPLE     = 8'h02;
  localparam logic [7:0] PKT_GET_METRIC = 8'h03;
  localparam logic [7:0] PKT_GET_MODEL  = 8'h04;

  // Fixed-point multiply with truncation toward minus infinity.
  function automatic word_t fx_mul(word_t a, word_t b);
    logic signed [2*DATA_W-1:0] p;
    p = $signed(a) * $signed(b);
    return word_t'(p >>> FRAC_BITS);
  endfunction

endpackage
