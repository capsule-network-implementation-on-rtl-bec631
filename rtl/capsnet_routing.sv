// capsnet_routing: routing-by-agreement accelerator for a capsule network
// (top level).
//
// The convolutional and primary-capsule layers run in software; what reaches
// this block is the prediction matrix u_hat: one 16-dimensional prediction
// u_hat_j|i for each pair of input capsule i (N_IN = 31) and digit capsule j
// (N_OUT = 10), stored as 160 rows (row j*16+d) by 31 columns of signed
// Q15.16 words. The block runs dynamic routing (Procedure 1) and returns the
// length of each digit capsule; the longest one is the recognised digit.
//
// The datapath follows the flowchart of the source design, one step per
// cycle under routing_ctrl, with every step computed fully in parallel:
//   SOFTMAX   c[j][i]   <= 2^b[j][i] / sum_k 2^b[k][i]   (31 softmax_unit)
//   REP1      crep[r][i]<= c[r/16][i]    Replication_1: c onto u_hat's grid
//   DOT_PRO   s[r]      <= sum_i crep[r][i]*u[r][i]      (160 dot_pro_unit)
//   REP2      n2[j]     <= ||s_j||^2, shared by the rows of capsule j
//   SQUASH    v[r]      <= s[r]*||s_j||/(1+||s_j||^2)    (10 squash_unit)
//   RESHAPE   vm[j][d]  <= v[j*16+d]     160-vector to 10 x 16 matrix
//   UPDATE_B  b[j][i]   <= b[j][i] + u_hat_j|i . vm[j]   (310 update_b_unit)
//   MAG       mag_v[j]  <= ||vm[j]||                      (10 mag_unit)
// Update_b runs after every pass but the last; MAG after the last. exp is
// replaced by 2^x and all data are 32-bit words with 16 fractional bits, as
// in the source design. Loading u_hat through a word-wide write port, the
// start/done handshake and the one-cycle-per-step schedule are this
// design's choices.
//
// Interface: write u_hat while idle with u_we/u_row/u_col/u_wdata; raise
// start (level) to run; busy is high during the run; done and mag_v
// (unsigned Q16.16) are valid from the end of the run until start drops.
// Timing: done rises 7*ITERS clock edges after the edge that samples start
// (14 for ITERS = 2). Reset (rst_n, synchronous, active low) clears the
// controller and the outputs; u_hat keeps its contents.
module capsnet_routing #(
  parameter int unsigned N_IN  = capsnet_pkg::N_IN,
  parameter int unsigned N_OUT = capsnet_pkg::N_OUT,
  parameter int unsigned DIM   = capsnet_pkg::DIM,
  parameter int unsigned ITERS = capsnet_pkg::ITERS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic                         u_we,
  input  logic [$clog2(N_OUT*DIM)-1:0] u_row,
  input  logic [$clog2(N_IN)-1:0]      u_col,
  input  logic signed [31:0]           u_wdata,
  output logic                         busy,
  output logic                         done,
  output logic [31:0]                  mag_v [N_OUT]
);

  localparam int unsigned ROWS = N_OUT * DIM;
  localparam int unsigned NW   = capsnet_pkg::NW;

  // ---- state of the datapath -------------------------------------------
  logic signed [31:0] u    [ROWS][N_IN];   // u_hat store
  logic signed [31:0] b    [N_OUT][N_IN];  // routing logits
  logic        [31:0] c    [N_OUT][N_IN];  // coupling coefficients
  logic        [31:0] crep [ROWS][N_IN];   // c replicated onto u_hat's grid
  logic signed [31:0] s    [ROWS];         // weighted sums, row form
  logic        [NW-1:0] n2 [N_OUT];        // ||s_j||^2
  logic signed [31:0] v    [ROWS];         // squashed outputs, row form
  logic signed [31:0] vm   [N_OUT][DIM];   // squashed outputs, matrix form

  // ---- controller --------------------------------------------------------
  logic clear_b, en_softmax, en_rep1, en_dot, en_rep2, en_squash;
  logic en_reshape, en_update_b, en_mag;

  routing_ctrl #(.ITERS(ITERS)) u_ctrl (
    .clk, .rst_n, .start, .clear_b, .en_softmax, .en_rep1, .en_dot,
    .en_rep2, .en_squash, .en_reshape, .en_update_b, .en_mag, .flag(),
    .busy, .done);

  // ---- combinational step units -----------------------------------------
  logic        [31:0]   c_new  [N_OUT][N_IN];
  logic signed [31:0]   s_new  [ROWS];
  logic        [NW-1:0] n2_new [N_OUT];
  logic signed [31:0]   v_new  [ROWS];
  logic signed [31:0]   b_new  [N_OUT][N_IN];
  logic        [31:0]   m_new  [N_OUT];

  for (genvar i = 0; i < N_IN; i++) begin : g_col
    logic signed [31:0] b_col [N_OUT];
    logic        [31:0] c_col [N_OUT];
    for (genvar j = 0; j < N_OUT; j++) begin : g_j
      assign b_col[j]    = b[j][i];
      assign c_new[j][i] = c_col[j];
    end
    softmax_unit #(.N(N_OUT)) u_softmax (.b(b_col), .c(c_col));
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    dot_pro_unit #(.N(N_IN)) u_dot (.c(crep[r]), .u(u[r]), .s(s_new[r]));
  end

  for (genvar j = 0; j < N_OUT; j++) begin : g_caps
    logic signed [31:0] s_vec [DIM];
    logic signed [31:0] v_vec [DIM];
    for (genvar d = 0; d < DIM; d++) begin : g_d
      assign s_vec[d]         = s[j*DIM+d];
      assign v_new[j*DIM + d] = v_vec[d];
    end
    norm2_unit  #(.D(DIM), .NW(NW)) u_rep2   (.x(s_vec), .n2(n2_new[j]));
    squash_unit #(.D(DIM), .NW(NW)) u_squash (.s(s_vec), .n2(n2[j]), .v(v_vec));
    mag_unit    #(.D(DIM), .NW(NW)) u_mag    (.v(vm[j]), .mag(m_new[j]));

    for (genvar i = 0; i < N_IN; i++) begin : g_upd
      logic signed [31:0] u_vec [DIM];
      for (genvar d = 0; d < DIM; d++) begin : g_d
        assign u_vec[d] = u[j*DIM+d][i];
      end
      update_b_unit #(.D(DIM)) u_upd (.b(b[j][i]), .u(u_vec), .v(vm[j]),
                                      .b_next(b_new[j][i]));
    end
  end

  // ---- registers -----------------------------------------------------------
  // u_hat store: written only while the controller is idle.
  always_ff @(posedge clk) begin
    if (u_we && !busy && !done) u[u_row][u_col] <= u_wdata;
  end

  always_ff @(posedge clk) begin
    if (clear_b)          b  <= '{default: '0};
    else if (en_update_b) b  <= b_new;
    if (en_softmax)       c  <= c_new;
    if (en_dot)           s  <= s_new;
    if (en_rep2)          n2 <= n2_new;
    if (en_squash)        v  <= v_new;
  end

  // Replication_1 and Reshaping are pure data movements, one cycle each.
  for (genvar r = 0; r < ROWS; r++) begin : g_rep1
    for (genvar i = 0; i < N_IN; i++) begin : g_i
      always_ff @(posedge clk) if (en_rep1) crep[r][i] <= c[r / DIM][i];
    end
  end

  for (genvar j = 0; j < N_OUT; j++) begin : g_reshape
    for (genvar d = 0; d < DIM; d++) begin : g_d
      always_ff @(posedge clk) if (en_reshape) vm[j][d] <= v[j*DIM + d];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)      mag_v <= '{default: '0};
    else if (en_mag) mag_v <= m_new;
  end

  // The u_hat write port addresses must stay inside the matrix.
  a_u_addr: assert property (@(posedge clk) disable iff (!rst_n)
    u_we |-> (32'(u_row) < ROWS) && (32'(u_col) < N_IN));

endmodule
