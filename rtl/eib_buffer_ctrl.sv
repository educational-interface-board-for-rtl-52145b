// eib_buffer_ctrl: enables and direction of the interface buffers.
//
// Master side: the master address and data buffers open only while the
// master owns either the shared memory (MSMRA) or the target bus (MTMRA),
// each qualified by the master's strobe: AS for the address buffer
// (MADEN), LDS for the low data byte (LDEN), UDS for the high byte (HDEN).
// Target side: the data buffers open while the master owns the target bus
// or the target owns the shared memory (LEN); the high byte (HEN) stays
// closed for an 8-bit target (PIA PA0 = 1). The target data buffer drives
// toward the target bus (tdir = 1) for a master write into the target and
// for a target read from the shared memory. All outputs are combinational.
//
// Signal names and the function come from the board's buffer-enable and
// direction circuits.
module eib_buffer_ctrl (
  input  logic msmra_n,   // master owns shared memory
  input  logic mtmra_n,   // master owns target bus
  input  logic tsmra_n,   // target owns shared memory
  input  logic mas_n,
  input  logic muds_n,
  input  logic mlds_n,
  input  logic mrw,       // master R/W (1 = read)
  input  logic trw,       // target R/W (1 = read)
  input  logic pa0,       // 1 = 8-bit target, 0 = 16-bit target
  output logic maden_n,   // master address buffer enable
  output logic lden_n,    // master low data byte enable
  output logic hden_n,    // master high data byte enable
  output logic len_n,     // target low data byte enable
  output logic hen_n,     // target high data byte enable
  output logic tdir       // 1 = target data buffer drives the target bus
);

  logic mown_n;   // master owns something behind the buffers

  always_comb begin
    mown_n  = msmra_n & mtmra_n;
    maden_n = mown_n | mas_n;
    lden_n  = mown_n | mlds_n;
    hden_n  = mown_n | muds_n;
    len_n   = mtmra_n & tsmra_n;
    hen_n   = len_n | pa0;
    tdir    = (!mtmra_n && !mrw) || (!tsmra_n && trw);
  end

endmodule
