// master_controller: sequences the time steps of the machine.
//
// One time step is two sweeps over the active grid: the E half step, which
// computes e_x, e_y, e_z of every cell from b, then the b half step, which
// computes b_x, b_y, b_z from the new E. A sweep issues one cell per clock in
// raster order, i fastest, then j, then k. Between sweeps the controller
// waits DRAIN clocks so that the last results of a sweep are written back
// before the next sweep reads them (a stall of DRAIN clocks per half step).
// The E-then-b order and the cell-per-clock scan follow the machine; the
// drain stall and the run-time grid size (nx, ny, nz, up to the capacity
// 2**XW x 2**YW x 2**ZW) are this design's.
//
// Interface: start (one clock, while idle) runs n_steps time steps; busy is
// high from the clock after start until the last write-back has happened,
// done pulses once at the end. issue_valid/phase/i/j/k name the cell whose
// memory words are read this clock; step is the current time step (it
// addresses the input-signal memory). A run of n time steps takes
// n*2*(nx*ny*nz + DRAIN) clocks of busy.
module master_controller
  import fdtd_pkg::*;
#(
  parameter int unsigned XW    = DEF_XW,
  parameter int unsigned YW    = DEF_YW,
  parameter int unsigned ZW    = DEF_ZW,
  parameter int unsigned SW    = 16,           // time-step counter width
  parameter int unsigned DRAIN = CALC_LAT + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [SW-1:0] n_steps,
  input  logic [XW:0]   nx,
  input  logic [YW:0]   ny,
  input  logic [ZW:0]   nz,
  output logic          busy,
  output logic          done,
  output logic          issue_valid,
  output phase_e        phase,
  output logic [XW-1:0] i,
  output logic [YW-1:0] j,
  output logic [ZW-1:0] k,
  output logic [SW-1:0] step,
  output logic          draining
);

  typedef enum logic [1:0] {S_IDLE, S_SWEEP, S_DRAIN} state_e;
  state_e state;

  logic [$clog2(DRAIN+1)-1:0] dcnt;
  logic [SW-1:0]              nsteps_q;

  logic last_i, last_j, last_k;
  always_comb begin
    last_i = ({1'b0, i} == nx - 1'b1);
    last_j = ({1'b0, j} == ny - 1'b1);
    last_k = ({1'b0, k} == nz - 1'b1);
  end

  assign issue_valid = (state == S_SWEEP);
  assign busy        = (state != S_IDLE);
  assign draining    = (state == S_DRAIN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      phase    <= PH_E;
      i        <= '0;
      j        <= '0;
      k        <= '0;
      step     <= '0;
      nsteps_q <= '0;
      dcnt     <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            nsteps_q <= n_steps;
            step     <= '0;
            phase    <= PH_E;
            i        <= '0;
            j        <= '0;
            k        <= '0;
            if (n_steps == '0) done  <= 1'b1;
            else               state <= S_SWEEP;
          end
        end
        S_SWEEP: begin
          if (!last_i) begin
            i <= i + 1'b1;
          end else begin
            i <= '0;
            if (!last_j) begin
              j <= j + 1'b1;
            end else begin
              j <= '0;
              if (!last_k) begin
                k <= k + 1'b1;
              end else begin
                k     <= '0;
                state <= S_DRAIN;
                dcnt  <= ($clog2(DRAIN+1))'(DRAIN - 1);
              end
            end
          end
        end
        S_DRAIN: begin
          if (dcnt != '0) begin
            dcnt <= dcnt - 1'b1;
          end else if (phase == PH_E) begin
            phase <= PH_H;
            state <= S_SWEEP;
          end else begin
            phase <= PH_E;
            step  <= step + 1'b1;
            if (step + 1'b1 == nsteps_q) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_SWEEP;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_grid_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && start) |-> (nx != 0 && ny != 0 && nz != 0))
    else $error("master_controller: empty grid");

endmodule
