// me_controller: sequencer of one integer motion-vector search.
//
// A search runs in three phases, counted in row periods of 2P cycles:
//   INIT  : N-1 periods; search rows 0 .. N-2 are streamed in and pushed up
//           through the stream memory bank (the document's 2P*(N-1) cycle
//           initialization phase).
//   EXEC  : 2P periods; every cycle one candidate leaves the PE array, so
//           the (2P)^2 candidates take (2P)^2 cycles.
//   DRAIN : N-1 cycles that deliver the boundary (RS) words of the last
//           search row. When the next search was requested before EXEC ends
//           ("start" pending), DRAIN is skipped: these cycles then coincide
//           with the first INIT cycles of the next search, whose RS slots are
//           free, so back-to-back searches take (2P)^2 + 2P*(N-1) cycles each.
// The row phase is kept twice: as a binary pointer for the pointer-addressed
// stream memory and in the ring counter that makes the column controls.
//
// Candidate tagging: the PE array output in EXEC cycle 2P*y + x + LAT0
// belongs to candidate (x, y), x, y in 0 .. 2P-1, where LAT0 = N-1 for the
// semi-systolic array and 2N-1 for the systolic array (SYSTOLIC = 1), whose
// rows are skewed by one cycle each. cand_valid / cand_first / cand_last / cand_x / cand_y
// describe the PE array output of the current cycle.
//
// start is sampled at a clock edge; the first INIT cycle is the next cycle.
// The three-phase split follows the document's timing figures; the start
// handshake and the pending request are this design's choices.
module me_controller
  import me_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16,
  parameter bit          SYSTOLIC = 1'b0,
  localparam int unsigned PH_W  = cnt_w(2*P),
  localparam int unsigned PER_W = cnt_w((2*P > N) ? 2*P : N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            in_exec,    // EXEC state
  output logic            adv,        // stream memory advances
  output logic [PH_W-1:0] phase,      // row phase 0 .. 2P-1
  output logic [N-1:0]    col_rs,     // per-column RS select
  output logic            cand_valid,
  output logic            cand_first,
  output logic            cand_last,
  output logic [PH_W-1:0] cand_x,
  output logic [PH_W-1:0] cand_y
);

  localparam int unsigned LASTPH = 2*P - 1;
  // exec cycle in which candidate (0,0) leaves the PE array
  localparam int unsigned LAT0   = SYSTOLIC ? 2*N - 1 : N - 1;
  localparam int unsigned ARM_PER = (LAT0 - 1) / (2*P);
  localparam int unsigned ARM_PH  = (LAT0 - 1) % (2*P);
  // row pointer value in the cycle where the ring counter is in its last phase
  localparam int unsigned RING_LAST = SYSTOLIC ? N - 2 : 2*P - 1;

  me_state_e        st_q;
  logic [PER_W-1:0] per_q;
  logic [PH_W-1:0]  ph_q;
  logic             pend_q;
  logic             restart;
  logic             ring_run;
  logic             period_last;
  logic             ph_last;
  logic             arm;
  logic             on_q;
  logic [PH_W-1:0]  cx_q, cy_q;

  assign ph_last = (32'(ph_q) == LASTPH);
  // SSA: the ring counter starts with the search. SA: the PE of column c
  // registers its select, and its candidate phase trails the row pointer by
  // N, so the counter is started when the pointer reads N-2 in the first
  // INIT period and then wraps in step with it.
  assign restart = SYSTOLIC ? ((st_q == ST_INIT) && (per_q == '0) && (32'(ph_q) == N - 2))
                            : ((st_q == ST_IDLE) && (start || pend_q));
  assign ring_run = adv || on_q;
  assign adv     = (st_q != ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= ST_IDLE;
      per_q  <= '0;
      ph_q   <= '0;
      pend_q <= 1'b0;
    end else begin
      unique case (st_q)
        ST_IDLE: begin
          ph_q  <= '0;
          per_q <= '0;
          if (start || pend_q) begin
            st_q   <= ST_INIT;
            pend_q <= 1'b0;
          end
        end
        ST_INIT: begin
          if (start) pend_q <= 1'b1;
          ph_q <= ph_last ? '0 : ph_q + 1'b1;
          if (ph_last) begin
            if (32'(per_q) == N - 2) begin
              st_q  <= ST_EXEC;
              per_q <= '0;
            end else begin
              per_q <= per_q + 1'b1;
            end
          end
        end
        ST_EXEC: begin
          ph_q <= ph_last ? '0 : ph_q + 1'b1;
          if (start) pend_q <= 1'b1;
          if (ph_last) begin
            if (32'(per_q) == LASTPH) begin
              per_q <= '0;
              if (start || pend_q) begin
                st_q   <= ST_INIT;
                pend_q <= 1'b0;
              end else begin
                st_q <= ST_DRAIN;
              end
            end else begin
              per_q <= per_q + 1'b1;
            end
          end
        end
        ST_DRAIN: begin
          if (start) pend_q <= 1'b1;
          ph_q <= ph_q + 1'b1;
          if (32'(ph_q) == N - 2) st_q <= ST_IDLE;
        end
        default: st_q <= ST_IDLE;
      endcase
    end
  end

  ring_counter #(.N(N), .P(P), .AT_END(SYSTOLIC)) u_ring (
    .clk        (clk),
    .rst_n      (rst_n),
    .restart    (restart),
    .run        (ring_run),
    .col_rs     (col_rs),
    .period_last(period_last)
  );

  // Candidate tagging: arm one cycle before candidate (0,0) leaves the array.
  assign arm = (st_q == ST_EXEC) && (32'(per_q) == ARM_PER) && (32'(ph_q) == ARM_PH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      on_q <= 1'b0;
      cx_q <= '0;
      cy_q <= '0;
    end else if (arm) begin
      on_q <= 1'b1;
      cx_q <= '0;
      cy_q <= '0;
    end else if (on_q) begin
      cx_q <= (32'(cx_q) == LASTPH) ? '0 : cx_q + 1'b1;
      if (32'(cx_q) == LASTPH) begin
        cy_q <= cy_q + 1'b1;
        if (32'(cy_q) == LASTPH) on_q <= 1'b0;
      end
    end
  end

  assign busy       = (st_q != ST_IDLE) || on_q;
  assign in_exec    = (st_q == ST_EXEC);
  assign phase      = ph_q;
  assign cand_valid = on_q;
  assign cand_first = on_q && (cx_q == '0) && (cy_q == '0);
  assign cand_last  = on_q && (32'(cx_q) == LASTPH) && (32'(cy_q) == LASTPH);
  assign cand_x     = cx_q;
  assign cand_y     = cy_q;

  // The ring counter and the binary pointer must agree on the period end.
  a_ring_in_step: assert property (@(posedge clk) disable iff (!rst_n) (st_q == ST_EXEC) |-> (period_last == (32'(ph_q) == RING_LAST)))
    else $error("ring counter out of step with the row pointer");

  initial begin
    assert (N >= 2 && N - 1 <= 2 * P) else $fatal(1, "need 2 <= N <= 2P + 1");
  end

endmodule
