// mbist_march_ctrl: March algorithm block, the FSM at the heart of the MBIST.
//
// On 'start' it latches the algorithm select and runs every element of that
// algorithm (see mbist_pkg): for each address of the element it issues the
// element's operations, one memory operation per clock cycle, with no idle
// cycle between words or between elements. The address comes from
// mbist_addr_gen, which this block loads at the start of each element and
// steps after the last operation on a word. The data background of the
// current operation goes to mbist_data_gen.
//
// States: IDLE -> RUN (one cycle per operation) -> DRAIN (one cycle, so the
// read issued in the last RUN cycle is compared) -> DONE. 'done' stays high
// in DONE until the next 'start'. A test of an algorithm with k operations
// per word on 2**AW words therefore ends with 'done' rising k*2**AW + 2
// cycles after the cycle in which 'start' was sampled. 'ag_down' only
// matters together with 'ag_load'; the address generator keeps the
// direction of the running element.
// The document gives the block's purpose (an FSM-based March engine for
// March 5n and MATS++); the state encoding and timing are this design's.
// Assertions check that the address generator is never loaded and stepped
// in the same cycle.
module mbist_march_ctrl
  import mbist_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  alg_e              alg_sel,
  // address generator
  output logic              ag_load,
  output logic              ag_step,
  output logic              ag_down,
  input  logic              ag_last,
  // memory operation issued this cycle
  output logic              op_valid,
  output logic              op_we,
  output pattern_e          op_pat,
  output logic [ELEM_W-1:0] op_elem,
  output logic [OP_W-1:0]   op_idx,
  // status
  output logic              busy,
  output logic              done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_DONE} state_e;

  state_e            state;
  alg_e              alg;
  logic [ELEM_W-1:0] elem;
  logic [OP_W-1:0]   opi;
  march_elem_t       cur, nxt;
  logic              last_op, last_elem;

  assign cur       = get_elem(alg, elem);
  assign nxt       = get_elem(alg, elem + 1'b1);
  assign last_op   = (opi == cur.nops - 1'b1);
  assign last_elem = (elem == num_elems(alg) - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      alg   <= ALG_MARCH5N;
      elem  <= '0;
      opi   <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state <= S_RUN;
            alg   <= alg_sel;
            elem  <= '0;
            opi   <= '0;
          end
        end
        S_RUN: begin
          if (!last_op) begin
            opi <= opi + 1'b1;
          end else begin
            opi <= '0;
            if (ag_last) begin
              if (last_elem) state <= S_DRAIN;
              else           elem  <= elem + 1'b1;
            end
          end
        end
        S_DRAIN: state <= S_DONE;
      endcase
    end
  end

  // Address generator control: load for element 0 on start, load for the
  // next element after the last operation at the last address, else step
  // after the last operation on a word.
  always_comb begin
    ag_load = 1'b0;
    ag_step = 1'b0;
    ag_down = 1'b0;
    if ((state == S_IDLE || state == S_DONE) && start) begin
      ag_load = 1'b1;
      ag_down = get_elem(alg_sel, '0).down;
    end else if (state == S_RUN && last_op) begin
      if (ag_last) begin
        ag_load = !last_elem;
        ag_down = nxt.down;
      end else begin
        ag_step = 1'b1;
      end
    end
  end

  assign op_valid = (state == S_RUN);
  assign op_we    = op_valid && cur.ops[opi].we;
  assign op_pat   = cur.ops[opi].pat;
  assign op_elem  = elem;
  assign op_idx   = opi;
  assign busy     = (state == S_RUN) || (state == S_DRAIN);
  assign done     = (state == S_DONE);

  // The address generator is either loaded or stepped, never both, and only
  // while an operation is issued or a test starts.
  a_load_step_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(ag_load && ag_step));
  a_step_only_in_run: assert property (@(posedge clk) disable iff (!rst_n)
    ag_step |-> state == S_RUN);
  // An element never has more operations than the table allows.
  a_op_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    op_valid |-> (opi < cur.nops && 32'(cur.nops) <= MAX_OPS));

endmodule
