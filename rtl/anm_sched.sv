// anm_sched: the fixed A^N M schedule that hides when memory is really used.
//
// Execution is cut into rounds of N instruction slots ("A") followed by one
// ORAM access ("M"), the same for every program and input. An instruction
// slot is SLOT_CYCLES cycles; the scheduler opens it with slot_start. If the
// core is waiting for spld in a slot, the slot passes with no work (a dummy
// A). At the end of the N slots the ORAM gets one request: the spld unit's
// pending request if there is one (a real M), otherwise a dummy access (a
// dummy M). After the T-th ORAM access the program's time is up and `done`
// rises and stays; T counts ORAM accesses, not cycles, so the receiver cannot
// learn the real finish time by slowing the DRAM.
//
// The document sets N = ORAM latency / instruction latency: N = 1000 with
// 3-cycle slots for the scratchpad configuration (3000 with 1-cycle slots
// without one). go starts the schedule; t_count is the number of ORAM
// accesses made so far. The ev_* pulses mark dummy A slots and real and
// dummy M accesses, for monitoring. The request's address, write flag and
// data pass straight from the spld unit to the ORAM; the scheduler decides
// only when a request goes out and whether it is real or dummy.
module anm_sched #(
  parameter int unsigned N           = 1000,
  parameter int unsigned SLOT_CYCLES = 3,
  parameter int unsigned ADDR_W      = 16,
  parameter int unsigned BLOCK_BITS  = hop_pkg::BLOCK_BITS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  go,
  input  logic [63:0]           t_max,
  output logic                  running,
  output logic                  done,
  output logic [63:0]           t_count,
  // core
  output logic                  slot_start,
  input  logic                  core_stalled,
  // spld unit
  input  logic                  sp_req_valid,
  input  logic                  sp_req_write,
  input  logic [ADDR_W-1:0]     sp_req_addr,
  input  logic [BLOCK_BITS-1:0] sp_req_wdata,
  output logic                  sp_grant,
  output logic                  sp_rsp_valid,
  // ORAM controller
  output logic                  o_req_valid,
  input  logic                  o_req_ready,
  output logic                  o_req_dummy,
  output logic                  o_req_write,
  output logic [ADDR_W-1:0]     o_req_addr,
  output logic [BLOCK_BITS-1:0] o_req_wdata,
  input  logic                  o_rsp_valid,
  // monitoring
  output logic                  ev_dummy_a,
  output logic                  ev_real_m,
  output logic                  ev_dummy_m
);
  localparam int unsigned NW = $clog2(N + 1);
  localparam int unsigned PW = $clog2(SLOT_CYCLES + 1);

  typedef enum logic [1:0] {S_IDLE, S_A, S_M_REQ, S_M_WAIT} state_e;
  state_e state_q;

  logic [NW-1:0] slot_q;
  logic [PW-1:0] phase_q;
  logic          real_q;

  assign running     = (state_q != S_IDLE) && !done;
  assign slot_start  = (state_q == S_A) && (phase_q == '0);
  assign o_req_valid = (state_q == S_M_REQ);
  assign o_req_dummy = !sp_req_valid;
  assign o_req_write = sp_req_valid && sp_req_write;
  assign o_req_addr  = sp_req_addr;
  assign o_req_wdata = sp_req_wdata;
  assign sp_grant    = o_req_valid && o_req_ready && sp_req_valid;
  assign sp_rsp_valid = (state_q == S_M_WAIT) && o_rsp_valid && real_q;
  assign ev_dummy_a  = slot_start && core_stalled;
  assign ev_real_m   = sp_grant;
  assign ev_dummy_m  = o_req_valid && o_req_ready && !sp_req_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      slot_q  <= '0;
      phase_q <= '0;
      real_q  <= 1'b0;
      done    <= 1'b0;
      t_count <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (go) begin
          if (t_max == 64'd0) done <= 1'b1;
          else begin
            slot_q  <= '0;
            phase_q <= '0;
            state_q <= S_A;
          end
        end
        S_A: begin
          if (phase_q == PW'(SLOT_CYCLES - 1)) begin
            phase_q <= '0;
            if (slot_q == NW'(N - 1)) begin
              slot_q  <= '0;
              state_q <= S_M_REQ;
            end else begin
              slot_q <= slot_q + 1'b1;
            end
          end else begin
            phase_q <= phase_q + 1'b1;
          end
        end
        S_M_REQ: if (o_req_ready) begin
          real_q  <= sp_req_valid;
          state_q <= S_M_WAIT;
        end
        S_M_WAIT: if (o_rsp_valid) begin
          t_count <= t_count + 64'd1;
          if (t_count + 64'd1 == t_max) begin
            done    <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            state_q <= S_A;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The ORAM request must be stable until it is accepted.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    o_req_valid && !o_req_ready |=> o_req_valid);

endmodule
