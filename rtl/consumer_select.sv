// consumer_select: Consumer Select Unit of the PPU, with the consumer-list
// memory.
//
// A template has two 16-bit consumer fields. When a thread has at most two
// consumers they are named directly (a zero field means "no consumer"). When it
// has more, the first field is zero and the second points into a consumer list
// kept in TSU memory; the list holds one Thread# per word and ends with a zero
// word. Given the two fields and the completion status of the producer, this
// unit emits the consumers to be updated one at a time. For a switch thread
// the status keeps only consumer 1 (ST_CONS1) or only consumer 2 (ST_CONS2);
// ST_NONE updates nobody; a list is always walked completely.
//
// The two-field rule comes from the document. The zero-terminated list, its
// size (CL_DEPTH words), and the use of the status as a switch predicate are
// this design's choices.
//
// Interface: start (one cycle, only while busy is low) with cons1/cons2/
// status. out_valid/out_tnum/out_ready hand over the consumers; busy stays high
// until the last one is taken. Timing: a direct consumer is offered the cycle
// after start; each list entry costs one read cycle plus its hand-over.
module consumer_select
  import d2cmp_pkg::*;
#(
  parameter int unsigned CL_DEPTH = 256
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // consumer list loading
  input  logic                        cl_we,
  input  logic [$clog2(CL_DEPTH)-1:0] cl_waddr,
  input  tnum_t                       cl_wdata,
  // request
  input  logic                        start,
  input  tnum_t                       cons1,
  input  tnum_t                       cons2,
  input  status_e                     status,
  output logic                        busy,
  output logic                        list_mode,   // current request walks a list
  // consumer stream
  output logic                        out_valid,
  output tnum_t                       out_tnum,
  input  logic                        out_ready
);
  localparam int unsigned LW = $clog2(CL_DEPTH);

  typedef enum logic [2:0] {S_IDLE, S_C1, S_C2, S_LRD, S_LOUT} state_e;

  state_e         state_q;
  tnum_t          c1_q, c2_q;
  logic           use2_q;
  logic [LW-1:0]  ptr_q;
  tnum_t          cl_mem [CL_DEPTH];
  tnum_t          cl_rdata;

  always_ff @(posedge clk) begin
    if (cl_we) cl_mem[cl_waddr] <= cl_wdata;
    cl_rdata <= cl_mem[ptr_q];
  end

  assign busy      = (state_q != S_IDLE);
  assign list_mode = (state_q == S_LRD) || (state_q == S_LOUT);

  always_comb begin
    out_valid = 1'b0;
    out_tnum  = '0;
    unique case (state_q)
      S_C1:    begin out_valid = 1'b1;              out_tnum = c1_q;     end
      S_C2:    begin out_valid = 1'b1;              out_tnum = c2_q;     end
      S_LOUT:  begin out_valid = (cl_rdata != '0);  out_tnum = cl_rdata; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      c1_q    <= '0;
      c2_q    <= '0;
      use2_q  <= 1'b0;
      ptr_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          c1_q <= cons1;
          c2_q <= cons2;
          if (cons1 == '0 && cons2 != '0) begin
            ptr_q   <= cons2[LW-1:0];
            state_q <= S_LRD;
          end else begin
            use2_q <= (cons2 != '0) && (status == ST_ALL || status == ST_CONS2);
            if ((cons1 != '0) && (status == ST_ALL || status == ST_CONS1))
              state_q <= S_C1;
            else if ((cons2 != '0) && (status == ST_ALL || status == ST_CONS2))
              state_q <= S_C2;
          end
        end
        S_C1: if (out_ready) state_q <= use2_q ? S_C2 : S_IDLE;
        S_C2: if (out_ready) state_q <= S_IDLE;
        S_LRD: state_q <= S_LOUT;          // list word read, valid next cycle
        S_LOUT: begin
          if (cl_rdata == '0) state_q <= S_IDLE;
          else if (out_ready) begin
            ptr_q   <= ptr_q + 1'b1;
            state_q <= S_LRD;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
