// seg_controller: sequencer of the segmentation chip.
//
// It runs the algorithm's flow once per frame (go):
//   PRE    request the rightmost pixel column from the input image memory
//   LOAD   N+1 steps of two clocks (phase 0, phase 1): pixel column N-1-k
//          arrives in phase 0 of step k (none in the last step), one weight
//          chunk per block row is shifted into the network every clock, and
//          from step 1 on one leader bit per row is shifted in at phase 1.
//          The next column is requested in phase 1.
//   SEARCH start is applied to the token chain; if the token reaches the end
//          (finish) the frame is segmented, otherwise the seed cell holding
//          the token self-excites (seed_en) on this clock.
//   GROW   while any cell is excitable, all excitable cells are excited each
//          clock; in the first clock with none, the segment is inhibited and
//          labelled (labelw) and the search resumes.
//   COPY   labels are copied into the weight chains,
//   READ   2*(N+1) clocks of read-out to the segmentation memory,
//   DONE   until the next go.
// A segment whose growth assigns E distinct excitation numbers (the seed being
// the first) therefore takes E+1 clocks, and a frame with S segments takes
// sum(E_s + 1) + 1 clocks between the first SEARCH and COPY.
//
// With WEIGHT_SERIAL = 1 the network is built from weight-serial cells, which
// need nine clocks to form a sum. acc_step then counts 0..8 (0 in SEARCH, the
// seed clock, and 1..8,0,1..8,0,... in GROW), and grow_en or labelw is only
// issued at acc_step 0 in GROW, when the cells' excitable outputs are valid.
// A segment then takes 9*E + 1 clocks and a frame sum(9*E_s + 1) + 1.
// With WEIGHT_SERIAL = 0 acc_step stays 0 and every GROW clock decides.
//
// The order of the phases follows the algorithm's flowchart; the state
// encoding, the counters and the clock-level schedule are this design's own.
module seg_controller
  import seg_pkg::*;
#(
  parameter int N = 10,
  parameter bit WEIGHT_SERIAL = 1'b0,
  localparam int COL_W = (N > 1) ? $clog2(N + 1) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             go,
  input  logic             finish,
  input  logic             any_excitable,
  output state_t           state,
  output logic             clr,
  output logic             img_rd_en,
  output logic [COL_W-1:0] img_rd_col,
  output logic             step_en,
  output logic             phase,
  output logic             new_valid,
  output logic             a_odd,
  output logic             shift_en,
  output logic             p_shift,
  output logic             start,
  output logic             seed_en,
  output logic             grow_en,
  output logic             labelw,
  output logic [3:0]       acc_step,     // weight-serial cells: summation step
  output logic             copy_label,
  output logic             rd_en,
  output logic             rd_first,
  output logic             busy,
  output logic             done,
  output logic [31:0]      seg_cycles    // clocks spent in SEARCH and GROW
);

  logic [COL_W-1:0] k;      // load step
  logic [COL_W:0]   rcnt;   // read-out clock
  logic [3:0]       astep;  // summation step in GROW (weight-serial cells)
  logic             decide; // the cells' excitable outputs are valid

  assign decide = !WEIGHT_SERIAL || astep == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      k          <= '0;
      phase      <= 1'b0;
      rcnt       <= '0;
      astep      <= '0;
      seg_cycles <= '0;
    end else begin
      unique case (state)
        ST_IDLE, ST_DONE: if (go) state <= ST_PRE;
        ST_PRE: begin
          state      <= ST_LOAD;
          k          <= '0;
          phase      <= 1'b0;
          seg_cycles <= '0;
        end
        ST_LOAD: begin
          phase <= !phase;
          if (phase) begin
            if (k == COL_W'(N)) state <= ST_SEARCH;
            else k <= k + COL_W'(1);
          end
        end
        ST_SEARCH: begin
          seg_cycles <= seg_cycles + 32'd1;
          state <= finish ? ST_COPY : ST_GROW;
          astep <= 4'd1;
        end
        ST_GROW: begin
          seg_cycles <= seg_cycles + 32'd1;
          astep <= (astep == 4'd8) ? 4'd0 : astep + 4'd1;
          if (decide && !any_excitable) state <= ST_SEARCH;
        end
        ST_COPY: begin
          state <= ST_READ;
          rcnt  <= '0;
        end
        ST_READ: begin
          rcnt <= rcnt + (COL_W+1)'(1);
          if (rcnt == (COL_W+1)'(2 * N + 1)) state <= ST_DONE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    clr        = (state == ST_IDLE || state == ST_DONE) && go;
    img_rd_en  = 1'b0;
    img_rd_col = '0;
    step_en    = state == ST_LOAD;
    new_valid  = k < COL_W'(N);
    a_odd      = 1'((N - int'(k)) % 2);
    shift_en   = state == ST_LOAD || state == ST_READ;
    p_shift    = state == ST_LOAD && phase && k != '0;
    start      = state == ST_SEARCH || state == ST_GROW;
    seed_en    = state == ST_SEARCH;
    grow_en    = state == ST_GROW && decide && any_excitable;
    labelw     = state == ST_GROW && decide && !any_excitable;
    acc_step   = (WEIGHT_SERIAL && state == ST_GROW) ? astep : 4'd0;
    copy_label = state == ST_COPY;
    rd_en      = state == ST_READ;
    rd_first   = state == ST_READ && rcnt == '0;
    busy       = state != ST_IDLE && state != ST_DONE;
    done       = state == ST_DONE;
    if (state == ST_PRE) begin
      img_rd_en  = 1'b1;
      img_rd_col = COL_W'(N - 1);
    end else if (state == ST_LOAD && phase && int'(k) + 1 < N) begin
      img_rd_en  = 1'b1;
      img_rd_col = COL_W'(N - 2 - int'(k));
    end
  end

endmodule
