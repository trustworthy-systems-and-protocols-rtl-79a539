// graph_dma: loads a monitoring graph from the external graph pool into a
// slot of the graph memory.
//
// On `start` the engine reads word 0 of the graph with ID `gid` from the pool,
// which holds the number of rows N, then copies words 1..N to graph memory
// rows frame+0 .. frame+N-1, one row per cycle. Pool reads are synchronous:
// `pool_rdata` answers the address of the previous cycle. `done` pulses
// after the last row is written; a load of N rows takes N+4 cycles from
// `start` to `done`.
// The document gives the DMA between graph pool and graph memory and that
// the load time grows with the number of rows; the pool layout (row count
// first) is this design's choice.
module graph_dma #(
  parameter int unsigned AW    = 14,
  parameter int unsigned GID_W = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [GID_W-1:0] gid,
  input  logic [AW-1:0]    frame,
  output logic             busy,
  output logic             done,
  // graph pool read port
  output logic             pool_rd,
  output logic [GID_W-1:0] pool_gid,
  output logic [AW-1:0]    pool_addr,
  input  logic [31:0]      pool_rdata,
  // graph memory write port
  output logic             gm_we,
  output logic [AW-1:0]    gm_waddr,
  output logic [31:0]      gm_wdata
);

  typedef enum logic [1:0] {D_IDLE, D_LEN, D_COPY} st_e;
  st_e              st_q;
  logic [GID_W-1:0] gid_q;
  logic [AW-1:0]    frame_q;
  logic [AW:0]      len_q;    // rows to copy
  logic [AW:0]      rd_q;     // next pool word to request (1-based row)
  logic [AW:0]      wr_q;     // rows written
  logic             pend_q;   // a row read is in flight

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= D_IDLE;
      gid_q   <= '0;
      frame_q <= '0;
      len_q   <= '0;
      rd_q    <= '0;
      wr_q    <= '0;
      pend_q  <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        D_IDLE: begin
          if (start) begin
            gid_q   <= gid;
            frame_q <= frame;
            rd_q    <= '0;
            wr_q    <= '0;
            pend_q  <= 1'b0;
            st_q    <= D_LEN;
          end
        end
        D_LEN: begin
          // word 0 requested in this state's first cycle
          if (pend_q) begin
            len_q  <= pool_rdata[AW:0];
            rd_q   <= (AW+1)'(1);
            pend_q <= 1'b0;
            st_q   <= D_COPY;
            if (pool_rdata[AW:0] == '0) begin
              done <= 1'b1;
              st_q <= D_IDLE;
            end
          end else begin
            pend_q <= 1'b1;
          end
        end
        D_COPY: begin
          if (rd_q <= len_q) rd_q <= rd_q + 1'b1;
          pend_q <= (rd_q <= len_q);
          if (pend_q) begin
            wr_q <= wr_q + 1'b1;
            if (wr_q + 1'b1 == len_q) begin
              done <= 1'b1;
              st_q <= D_IDLE;
            end
          end
        end
        default: st_q <= D_IDLE;
      endcase
    end
  end

  assign busy      = (st_q != D_IDLE);
  assign pool_gid  = gid_q;
  assign pool_rd   = (st_q == D_LEN && !pend_q) || (st_q == D_COPY && rd_q <= len_q);
  assign pool_addr = (st_q == D_COPY) ? rd_q[AW-1:0] : '0;
  assign gm_we     = (st_q == D_COPY) && pend_q;
  assign gm_waddr  = frame_q + wr_q[AW-1:0];
  assign gm_wdata  = pool_rdata;

endmodule
