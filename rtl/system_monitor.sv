// system_monitor: schedules the microtasks along the task flow graph.
//
// The task flow graph is held in a small table, one entry per task t:
// {last, succ}: after task t completes, task 'succ' runs next, unless 'last'
// is set, which ends the graph. Task t runs on microtask t. Scheduling follows
// run-to-completion: a 'run' pulse starts the graph at 'first_task'; the
// running microtask is the only one whose power gate is open, and it runs
// until it raises its 'done' output. The monitor then closes every gate for
// one cycle (GAP), which also returns the finished microtask to its initial
// state, and opens the successor's gate.
// Timing: RUN of a task starts the cycle after 'run' (or after the GAP);
// 'graph_done' pulses for one cycle after the last task's 'done' is seen.
// The design gives the monitor's function; the table format, the one-cycle
// gap and the handshake are this design's own choices.
module system_monitor #(
  parameter int unsigned NT = 4,
  parameter int unsigned TW = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // task flow graph table write port
  input  logic          tfg_we,
  input  logic [TW-1:0] tfg_addr,
  input  logic [TW:0]   tfg_wdata,   // {last, succ}
  // control
  input  logic          run,
  input  logic [TW-1:0] first_task,
  input  logic [NT-1:0] mt_done,
  output logic [NT-1:0] mt_power_gate,
  output logic          busy,
  output logic [TW-1:0] cur_task,
  output logic          graph_done
);
  typedef enum logic [1:0] {IDLE, RUN, GAP} mon_state_e;

  typedef struct packed {
    logic          last;
    logic [TW-1:0] succ;
  } tfg_entry_t;

  tfg_entry_t tfg [NT];
  mon_state_e st_q;
  logic [TW-1:0] cur_q;
  logic          last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < int'(NT); t++) tfg[t] <= '{last: 1'b1, succ: '0};
    end else if (tfg_we && 32'(tfg_addr) < NT) begin
      tfg[tfg_addr] <= tfg_entry_t'(tfg_wdata);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= IDLE;
      cur_q      <= '0;
      last_q     <= 1'b0;
      graph_done <= 1'b0;
    end else begin
      graph_done <= 1'b0;
      unique case (st_q)
        IDLE: if (run) begin
          st_q  <= RUN;
          cur_q <= first_task;
        end
        RUN: if (mt_done[cur_q]) begin
          st_q   <= GAP;
          last_q <= tfg[cur_q].last;
          cur_q  <= tfg[cur_q].succ;
        end
        GAP: begin
          if (last_q) begin
            st_q       <= IDLE;
            graph_done <= 1'b1;
          end else begin
            st_q <= RUN;
          end
        end
        default: st_q <= IDLE;
      endcase
    end
  end

  always_comb begin
    mt_power_gate = '1;
    if (st_q == RUN) mt_power_gate[cur_q] = 1'b0;
    busy     = (st_q != IDLE);
    cur_task = cur_q;
  end

  // at most one microtask awake at any time
  assert property (@(posedge clk) disable iff (!rst_n)
                   $countones(~mt_power_gate) <= 1)
    else $error("system_monitor: more than one microtask awake");
  // a running task keeps its gate open until it is done
  assert property (@(posedge clk) disable iff (!rst_n)
                   (st_q == RUN && !mt_done[cur_q]) |=> (st_q == RUN))
    else $error("system_monitor: task left before done");
endmodule
