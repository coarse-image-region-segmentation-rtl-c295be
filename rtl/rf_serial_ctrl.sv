// rf_serial_ctrl: sequencer of the pixel-serial resistive-fuse processor.
//
// LOAD : accepts IMG_W*IMG_H input pixels in raster order (in_valid/in_ready)
//        and hands out their addresses for the source and destination
//        memories.
// RUN  : reads the destination memory in raster order, one pixel per clock,
//        for 3 annealing phases (LUT2A, LUT2B, LUT2C) x R passes. The passes
//        follow each other without a gap: the window simply keeps streaming,
//        and pixels of a neighbouring pass are masked as outside the image.
// FLUSH: IMG_W + 1 extra window shifts without a read, so that the last row
//        of the last pass reaches the centre of the window.
// DRAIN: waits for the write-back of the last pixel (wb_last), then LOAD.
//
// Timing seen by the datapath: a read issued in cycle k returns data in
// cycle k+1, when `win_shift` is high. In that same cycle the centre
// descriptor (c_*) names the pixel that will sit at the window centre e in
// cycle k+2 (IMG_W + 1 shifts behind the read pointer), with its row, column
// and annealing phase; c_valid is low during the first IMG_W + 1 shifts.
// One frame takes IMG_W*IMG_H load cycles plus 3*R*IMG_W*IMG_H + IMG_W + 1
// stream cycles plus the pipeline latency. The gap-free pass schedule is this
// design's choice; the raster scan and phase order follow the published
// design.
module rf_serial_ctrl
  import rf_pkg::*;
#(
  parameter int unsigned IMG_W = SER_IMG_W,
  parameter int unsigned IMG_H = SER_IMG_H,
  parameter int unsigned R     = R_ITER,
  localparam int unsigned NPIX = IMG_W * IMG_H,
  localparam int unsigned AW   = $clog2(NPIX),
  localparam int unsigned XW   = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int unsigned YW   = (IMG_H > 1) ? $clog2(IMG_H) : 1,
  localparam int unsigned RW   = $clog2(R + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // input stream
  input  logic          in_valid,
  output logic          in_ready,
  output logic          load_we,
  output logic [AW-1:0] load_addr,
  // destination memory read
  output logic          dmem_re,
  output logic [AW-1:0] dmem_raddr,
  // window
  output logic          win_shift,
  // centre descriptor
  output logic          c_valid,
  output logic [AW-1:0] c_addr,
  output logic [XW-1:0] c_col,
  output logic [YW-1:0] c_row,
  output phase_e        c_phase,
  output logic          c_last_pass,
  // write-back of the final pixel
  input  logic          wb_last,
  output logic          busy
);

  typedef enum logic [1:0] {S_LOAD, S_RUN, S_FLUSH, S_DRAIN} state_e;
  state_e state;

  logic [AW-1:0] ld_addr;
  logic [AW-1:0] rd_addr;
  logic [RW-1:0] rd_iter;
  phase_e        rd_phase;
  logic [XW:0]   flush_cnt;
  logic [XW:0]   warm;
  logic          slot;        // read or flush slot this cycle
  logic [RW-1:0] c_iter;

  assign in_ready   = (state == S_LOAD);
  assign load_we    = in_valid && in_ready;
  assign load_addr  = ld_addr;
  assign dmem_re    = (state == S_RUN);
  assign dmem_raddr = rd_addr;
  assign slot       = (state == S_RUN) || (state == S_FLUSH);
  assign busy       = (state != S_LOAD);

  logic rd_last;
  assign rd_last = (32'(rd_addr) == NPIX - 1) && (32'(rd_iter) == R - 1) && (rd_phase == PH_C);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      ld_addr   <= '0;
      rd_addr   <= '0;
      rd_iter   <= '0;
      rd_phase  <= PH_A;
      flush_cnt <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (load_we) begin
          if (32'(ld_addr) == NPIX - 1) begin
            ld_addr  <= '0;
            rd_addr  <= '0;
            rd_iter  <= '0;
            rd_phase <= PH_A;
            state    <= S_RUN;
          end else begin
            ld_addr <= ld_addr + 1'b1;
          end
        end
        S_RUN: begin
          if (rd_last) begin
            state     <= S_FLUSH;
            flush_cnt <= (XW+1)'(IMG_W);
          end
          if (32'(rd_addr) == NPIX - 1) begin
            rd_addr <= '0;
            if (32'(rd_iter) == R - 1) begin
              rd_iter  <= '0;
              rd_phase <= phase_e'(rd_phase + 2'd1);
            end else begin
              rd_iter <= rd_iter + 1'b1;
            end
          end else begin
            rd_addr <= rd_addr + 1'b1;
          end
        end
        S_FLUSH: begin
          if (flush_cnt == '0) state <= S_DRAIN;
          else                 flush_cnt <= flush_cnt - 1'b1;
        end
        S_DRAIN: if (wb_last) state <= S_LOAD;
        default: state <= S_LOAD;
      endcase
    end
  end

  // window shift follows each read / flush slot by one cycle (read latency)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) win_shift <= 1'b0;
    else        win_shift <= slot;
  end

  // centre descriptor: starts after IMG_W + 1 shifts of a run
  assign c_valid     = win_shift && (32'(warm) == IMG_W + 1);
  assign c_last_pass = (c_phase == PH_C) && (32'(c_iter) == R - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      warm    <= '0;
      c_addr  <= '0;
      c_col   <= '0;
      c_row   <= '0;
      c_iter  <= '0;
      c_phase <= PH_A;
    end else if (state == S_LOAD) begin
      warm    <= '0;
      c_addr  <= '0;
      c_col   <= '0;
      c_row   <= '0;
      c_iter  <= '0;
      c_phase <= PH_A;
    end else if (win_shift) begin
      if (!c_valid) warm <= warm + 1'b1;
      else begin
        if (32'(c_addr) == NPIX - 1) begin
          c_addr <= '0;
          c_col  <= '0;
          c_row  <= '0;
          if (32'(c_iter) == R - 1) begin
            c_iter  <= '0;
            c_phase <= phase_e'(c_phase + 2'd1);
          end else begin
            c_iter <= c_iter + 1'b1;
          end
        end else begin
          c_addr <= c_addr + 1'b1;
          if (32'(c_col) == IMG_W - 1) begin
            c_col <= '0;
            c_row <= c_row + 1'b1;
          end else begin
            c_col <= c_col + 1'b1;
          end
        end
      end
    end
  end

  // a pass must be longer than the window lag plus the update pipeline,
  // otherwise a pixel would be read before its previous-pass write-back
  initial assert (NPIX > IMG_W + 5)
    else $error("rf_serial_ctrl: image too small for gap-free passes");

endmodule
