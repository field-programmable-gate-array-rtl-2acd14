// accel_ctrl: main sequencer of the convolution-layer accelerator.
//
// A layer with C_OUT output channels is computed in NG = ceil(C_OUT/PAR)
// passes; in each pass the PAR processing elements compute PAR output
// channels side by side (output-channel loop unrolled PAR times), and the
// memory controller streams the input image once. For each pass the
// sequencer selects the weight group (grp), starts the memory controller,
// writes every result that leaves the datapath into the output memory at
// grp*NOUT + index (NOUT = NOUT_POOL with pooling, else NOUT_FULL), and
// waits until the memory controller is idle and the datapath has drained
// (DRAIN cycles) before the next pass. The layer options in cfg_in are
// captured at start and held for the whole run.
//
// Interface: start (while idle) begins a run; busy is high until done, which
// pulses for one cycle at the end. cycle_count holds the number of clock
// cycles from start to done of the last run. The pass structure and the
// parameterized parallelism follow the design description's loop unrolling
// and parameterization; the exact sequencing is this implementation's choice.
module accel_ctrl
  import cnn_pkg::*;
#(
  parameter int C_OUT     = 6,
  parameter int PAR       = 3,
  parameter int NOUT_FULL = 784,
  parameter int NOUT_POOL = 196,
  parameter int DRAIN     = 6,
  parameter int OAW       = $clog2(n_groups(C_OUT, PAR) * NOUT_FULL),
  parameter int GW        = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  layer_cfg_t     cfg_in,
  output layer_cfg_t     cfg,
  output logic           busy,
  output logic           done,
  output logic [GW-1:0]  grp,
  // memory controller
  output logic           mc_start,
  input  logic           mc_busy,
  input  logic           mc_done,
  // datapath results
  output logic           dp_clear,
  input  logic           res_valid,
  output logic           out_we,
  output logic [OAW-1:0] out_waddr,
  // statistics
  output logic [31:0]    cycle_count,
  output logic [31:0]    pass_count
);

  localparam int NG = n_groups(C_OUT, PAR);

  typedef enum logic [2:0] {S_IDLE, S_LAUNCH, S_RUN, S_DRAIN, S_DONE} state_t;
  state_t      state;
  logic [31:0] res_cnt, expected, drain_cnt;
  logic        mc_fin;

  assign expected  = cfg.pool_en ? 32'(NOUT_POOL) : 32'(NOUT_FULL);
  assign busy      = (state != S_IDLE);
  assign mc_start  = (state == S_LAUNCH) && !mc_busy;
  assign dp_clear  = mc_start;
  assign out_we    = res_valid && (state == S_RUN);
  assign out_waddr = OAW'(32'(grp) * expected + res_cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cfg         <= '0;
      grp         <= '0;
      res_cnt     <= '0;
      drain_cnt   <= '0;
      mc_fin      <= 1'b0;
      done        <= 1'b0;
      cycle_count <= '0;
      pass_count  <= '0;
    end else begin
      done <= 1'b0;
      if (state != S_IDLE) cycle_count <= cycle_count + 1;
      unique case (state)
        S_IDLE: if (start) begin
          cfg         <= cfg_in;
          grp         <= '0;
          cycle_count <= 32'd1;
          pass_count  <= '0;
          state       <= S_LAUNCH;
        end
        S_LAUNCH: if (!mc_busy) begin
          res_cnt <= '0;
          mc_fin  <= 1'b0;
          state   <= S_RUN;
        end
        S_RUN: begin
          if (mc_done) mc_fin <= 1'b1;
          if (res_valid) res_cnt <= res_cnt + 1;
          if ((mc_fin || mc_done) && (res_cnt + 32'(res_valid)) == expected) begin
            drain_cnt <= '0;
            state     <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1;
          if (drain_cnt == 32'(DRAIN - 1)) begin
            pass_count <= pass_count + 1;
            if (32'(grp) == 32'(NG - 1)) begin
              state <= S_DONE;
            end else begin
              grp   <= grp + 1'b1;
              state <= S_LAUNCH;
            end
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // No result may arrive outside a pass, nor more results than a pass holds.
  a_res_in_pass: assert property (@(posedge clk) disable iff (!rst_n)
                                  res_valid |-> (state == S_RUN && res_cnt < expected));

endmodule
