// qemu_pkg: types and constants shared by the quantum-circuit emulation kernels.
//
// Every amplitude and every matrix element is a complex number held as two
// IEEE-754 binary64 values (real and imaginary part), 128 bits in all, so a
// state vector of n qubits takes 2^(n+4) bytes and a layer matrix 2^(2n+4)
// bytes. The 64-bit precision follows the emulator's description; packing the
// real part in the upper half is this design's own choice.
package qemu_pkg;

  typedef logic [63:0] fp64_t;

  typedef struct packed {
    fp64_t re;
    fp64_t im;
  } cplx_t;

  localparam fp64_t FP64_ZERO = 64'h0000_0000_0000_0000;
  localparam fp64_t FP64_ONE  = 64'h3FF0_0000_0000_0000;
  localparam fp64_t FP64_QNAN = 64'h7FF8_0000_0000_0000;

  localparam cplx_t CPLX_ZERO = '{re: FP64_ZERO, im: FP64_ZERO};
  localparam cplx_t CPLX_ONE  = '{re: FP64_ONE,  im: FP64_ZERO};

endpackage
